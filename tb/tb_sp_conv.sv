// tb_sp_conv: self-checking test of the serial-to-parallel converter.
// Sends cells bit by bit with idle gaps and a stray bit before the first
// start-of-cell, checks the parallel cell, its time stamp, the clock at
// which ready rises, acknowledgement, and the overrun rule.
module tb_sp_conv;
  import atm_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic rx_soc = 0, rx_valid = 0, rx_data = 0, ack = 0;
  tstamp_t now = 0;
  atm_cell_t cell_out;
  tstamp_t ts;
  logic ready, arrived, overrun;
  int checks = 0, failures = 0;
  int n_arr = 0, n_ovr = 0;

  sp_conv dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (rst_n && arrived) n_arr++;
    if (rst_n && overrun) n_ovr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input atm_cell_t c, input int gap_every);
    for (int i = CELL_BITS - 1; i >= 0; i--) begin
      rx_valid <= 1; rx_soc <= (i == CELL_BITS - 1); rx_data <= c[i];
      @(posedge clk);
      if (gap_every > 0 && i % gap_every == 0 && i != 0) begin
        rx_valid <= 0; rx_soc <= 0; rx_data <= 1'($urandom);
        @(posedge clk);
      end
    end
    rx_valid <= 0; rx_soc <= 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    atm_cell_t c1, c2, c3;
    tstamp_t t_last;
    c1 = make_cell(8'h12, 16'h3456, 32'd1);
    c2 = make_cell(8'hA5, 16'h0F0F, 32'd2);
    c3 = make_cell(8'h01, 16'h0001, 32'd3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // stray bits without a start of cell are ignored
    rx_valid <= 1; rx_data <= 1; repeat (5) @(posedge clk);
    rx_valid <= 0;
    check(ready == 0, "no cell after stray bits");
    send(c1, 0);
    #1;
    t_last = now - 1;          // `now` was sampled at the last bit's edge
    check(ready == 1, "ready one clock after last bit");
    check(cell_out == c1, "cell 1 contents");
    check(ts == t_last, "cell 1 time stamp");
    // ack releases the cell
    ack <= 1; @(posedge clk); ack <= 0; @(posedge clk); #1;
    check(ready == 0, "ready cleared by ack");
    // cell with gaps
    send(c2, 37);
    #1;
    check(ready == 1 && cell_out == c2, "cell 2 with idle gaps");
    // overrun: c3 completes while c2 is still held
    send(c3, 0);
    @(posedge clk); #1;
    check(n_ovr == 1, "overrun reported");
    check(cell_out == c2, "held cell kept on overrun");
    // ack in the same clock as completion: new cell loaded
    for (int i = CELL_BITS - 1; i >= 0; i--) begin
      rx_valid <= 1; rx_soc <= (i == CELL_BITS - 1); rx_data <= c3[i];
      ack <= (i == 0);
      @(posedge clk);
    end
    rx_valid <= 0; ack <= 0;
    #1;
    check(ready == 1 && cell_out == c3, "ack with completion loads new cell");
    @(posedge clk); #1;
    check(n_arr == 4, "four arrivals counted");
    check(n_ovr == 1, "single overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
