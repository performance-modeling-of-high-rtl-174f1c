// tb_cell_dmux: self-checking test of the cell demultiplexer: every port
// number with and without in_valid, plus out-of-range numbers for a
// 6-port instance, checking the one-hot load strobes and the cell fan-out.
module tb_cell_dmux;
  import atm_pkg::*;
  import tb_pkg::*;

  logic in_valid;
  logic [2:0] in_port;
  atm_cell_t in_cell, out_cell, out_cell6;
  logic [7:0] load;
  logic [5:0] load6;
  int checks = 0, failures = 0;

  cell_dmux #(.N_PORTS(8)) dut  (.in_valid, .in_port, .in_cell, .load, .out_cell);
  cell_dmux #(.N_PORTS(6)) dut6 (.in_valid, .in_port, .in_cell, .load(load6), .out_cell(out_cell6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 64; r++) begin
      in_valid = r[3];
      in_port  = 3'(r);
      in_cell  = make_cell(8'(r), 16'(r * 3), 32'(r));
      #1;
      check(load == (in_valid ? (8'd1 << r[2:0]) : 8'd0), "one-hot load, 8 ports");
      check(load6 == ((in_valid && r[2:0] < 6) ? (6'd1 << r[2:0]) : 6'd0), "one-hot load, 6 ports");
      check(out_cell == in_cell && out_cell6 == in_cell, "cell fan-out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
