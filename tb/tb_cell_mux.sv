// tb_cell_mux: self-checking test of the cell multiplexer. Presents
// different cells on all inputs, selects inputs in random order and checks
// that the selected cell appears one clock after load, with out_valid, and
// that the output holds when load is low.
module tb_cell_mux;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  conv_cell_t in [N];
  logic [2:0] sel;
  logic load = 0;
  conv_cell_t out;
  logic out_valid;
  int checks = 0, failures = 0;

  cell_mux #(.N_PORTS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    conv_cell_t held;
    for (int p = 0; p < N; p++) in[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(out_valid == 0, "no valid after reset");
    for (int r = 0; r < 300; r++) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        in[p].acell    = make_cell(8'($urandom), 16'($urandom), $urandom);
        in[p].ts       = $urandom;
        in[p].out_port = 8'($urandom_range(0, 7));
        in[p].status   = cnv_status_e'($urandom_range(0, 2));
      end
      s = $urandom_range(0, N - 1);
      sel = 3'(s);
      load = ($urandom_range(0, 3) != 0);
      held = load ? in[s] : out;
      @(posedge clk); #1;
      check(out_valid == load, "out_valid follows load");
      check(out == held, load ? "selected cell" : "held cell");
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
