// tb_hdr_cnv: self-checking test of the header converter. Fills part of the
// translation table, then converts cells that hit, miss, carry a bad HEC or
// map to a non-existent port, and compares port, header and payload with
// values computed here. Also checks the HEC of the standard idle-cell header
// (00 00 00 01 -> 52) and the one-clock conversion latency.
module tb_hdr_cnv;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int N = 8, D = 16;
  logic clk = 0, rst_n = 0;
  logic load = 0;
  atm_cell_t cell_in;
  tstamp_t ts_in;
  logic tbl_we = 0;
  logic [7:0] tbl_idx;
  vc_entry_t tbl_entry;
  conv_cell_t out;
  int checks = 0, failures = 0;

  hdr_cnv #(.N_PORTS(N), .TBL_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  vc_entry_t model [D];

  task automatic write_entry(input int idx, input vc_entry_t e);
    tbl_we <= 1; tbl_idx <= 8'(idx); tbl_entry <= e;
    @(posedge clk);
    tbl_we <= 0;
    model[idx] = e;
  endtask

  task automatic convert_and_check(input atm_cell_t c, input string what);
    int hit_idx;
    bit hec_ok;
    atm_hdr_t exp_hdr;
    tstamp_t t;
    t = $urandom;
    hit_idx = -1;
    for (int i = 0; i < D; i++)
      if (hit_idx < 0 && model[i].valid && model[i].in_vpi == c.hdr.vpi && model[i].in_vci == c.hdr.vci)
        hit_idx = i;
    hec_ok = (ref_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pt, c.hdr.clp}) == c.hdr.hec);
    cell_in <= c; ts_in <= t; load <= 1;
    @(posedge clk);
    load <= 0; cell_in <= '1;
    #1;
    if (!hec_ok) check(out.status == CNV_HEC_ERR, {what, ": HEC error"});
    else if (hit_idx < 0 || model[hit_idx].out_port >= N) check(out.status == CNV_NO_ROUTE, {what, ": no route"});
    else begin
      exp_hdr = c.hdr;
      exp_hdr.vpi = model[hit_idx].out_vpi;
      exp_hdr.vci = model[hit_idx].out_vci;
      exp_hdr.hec = ref_hec({exp_hdr.gfc, exp_hdr.vpi, exp_hdr.vci, exp_hdr.pt, exp_hdr.clp});
      check(out.status == CNV_OK, {what, ": status ok"});
      check(out.out_port == model[hit_idx].out_port, {what, ": output port"});
      check(out.acell.hdr == exp_hdr, {what, ": translated header"});
    end
    check(out.acell.payload == c.payload, {what, ": payload"});
    check(out.ts == t, {what, ": time stamp"});
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    atm_cell_t c;
    for (int i = 0; i < D; i++) model[i] = '0;
    check(ref_hec(32'h0000_0001) == 8'h52, "reference HEC of idle header");
    check(hec_calc(32'h0000_0001) == 8'h52, "RTL HEC of idle header");
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    write_entry(0, '{valid: 1, in_vpi: 8'h01, in_vci: 16'h0020, out_port: 8'd3, out_vpi: 8'h44, out_vci: 16'h1234});
    write_entry(5, '{valid: 1, in_vpi: 8'h02, in_vci: 16'h0021, out_port: 8'd7, out_vpi: 8'h55, out_vci: 16'hBEEF});
    write_entry(9, '{valid: 1, in_vpi: 8'h03, in_vci: 16'h0022, out_port: 8'd9, out_vpi: 8'h66, out_vci: 16'h0001});
    write_entry(15, '{valid: 1, in_vpi: 8'h02, in_vci: 16'h0021, out_port: 8'd1, out_vpi: 8'h00, out_vci: 16'h0000});
    write_entry(7, '{valid: 0, in_vpi: 8'h04, in_vci: 16'h0023, out_port: 8'd2, out_vpi: 8'h11, out_vci: 16'h2222});
    convert_and_check(make_cell(8'h01, 16'h0020, 32'd11), "hit entry 0");
    convert_and_check(make_cell(8'h02, 16'h0021, 32'd12), "hit entry 5 before 15");
    convert_and_check(make_cell(8'h03, 16'h0022, 32'd13), "entry to port 9");
    convert_and_check(make_cell(8'h04, 16'h0023, 32'd14), "invalid entry");
    convert_and_check(make_cell(8'h09, 16'h0999, 32'd15), "miss");
    convert_and_check(make_cell(8'h01, 16'h0020, 32'd16, 0), "bad HEC");
    // random traffic over random tables
    for (int r = 0; r < 200; r++) begin
      if (r % 20 == 0)
        write_entry($urandom_range(0, D - 1), '{valid: 1'($urandom), in_vpi: 8'($urandom_range(0, 3)),
                    in_vci: 16'($urandom_range(0, 3)), out_port: 8'($urandom_range(0, 9)),
                    out_vpi: 8'($urandom), out_vci: 16'($urandom)});
      c = make_cell(8'($urandom_range(0, 3)), 16'($urandom_range(0, 3)), $urandom, ($urandom_range(0, 9) != 0));
      convert_and_check(c, "random");
    end
    // output holds while load is low
    c = out.acell;
    repeat (3) @(posedge clk);
    #1 check(out.acell == c, "output held without load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
