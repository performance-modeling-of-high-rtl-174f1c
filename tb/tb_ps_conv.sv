// tb_ps_conv: self-checking test of the parallel-to-serial converter.
// Loads cells singly, back to back (load during the last bit) and after
// gaps; reassembles the line bits and checks contents, the start-of-cell
// strobe, the 424-clock cell time and the ready signal.
module tb_ps_conv;
  import atm_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0;
  atm_cell_t cell_in;
  logic ready, tx_soc, tx_valid, tx_data;
  int checks = 0, failures = 0;

  ps_conv dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // receiver: collects cells from the line, sampling mid-clock
  atm_cell_t rx_q[$];
  longint    soc_time[$];
  logic [CELL_BITS-1:0] sh;
  int nbits = 0;
  longint cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (tx_valid) begin
      if (tx_soc) begin
        if (nbits != 0) begin failures++; $display("FAIL: soc inside a cell %0d %0d", cyc, nbits); end
        nbits = 0;
        soc_time.push_back(cyc);
      end
      sh = {sh[CELL_BITS-2:0], tx_data};
      nbits++;
      if (nbits == CELL_BITS) begin rx_q.push_back(atm_cell_t'(sh)); nbits = 0; end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    atm_cell_t sent[$];
    atm_cell_t c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ready && !tx_valid, "idle and ready after reset");
    for (int k = 0; k < 12; k++) begin
      // wait for ready, then sometimes wait longer
      while (!ready) @(negedge clk);
      if (k % 3 == 2) repeat ($urandom_range(1, 30)) @(negedge clk);
      c = make_cell(8'(k), 16'(k * 7), $urandom);
      sent.push_back(c);
      cell_in = c; load = 1;
      @(negedge clk);
      load = 0; cell_in = '0;
      check(!ready, "busy after load");
    end
    while (tx_valid) @(negedge clk);
    @(negedge clk);
    check(rx_q.size() == sent.size(), "all cells received");
    for (int k = 0; k < sent.size() && k < rx_q.size(); k++)
      check(rx_q[k] == sent[k], "cell contents");
    // cells loaded on ready with no extra wait follow back to back
    for (int k = 1; k < soc_time.size(); k++)
      if (k % 3 != 2) check(soc_time[k] - soc_time[k-1] == CELL_BITS, "back-to-back cell spacing 424 clocks");
      else            check(soc_time[k] - soc_time[k-1] > CELL_BITS, "gap before delayed cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
