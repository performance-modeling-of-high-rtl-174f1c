// tb_shared_buffer: self-checking test of the shared cell buffer against a
// reference model of one FIFO per output. Random writes, reads and
// simultaneous write+read (same and different queues) are checked for
// read data, per-queue order, occupancy, q_nonempty and buffer_full; the
// buffer is driven to full repeatedly and drained.
module tb_shared_buffer;
  localparam int N = 8, D = 100, W = 456;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [2:0] wr_port = 0, rd_port = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full;
  logic [6:0] occupancy;
  logic [N-1:0] q_nonempty;
  int checks = 0, failures = 0;
  int n_full = 0, n_both = 0;

  shared_buffer #(.N_PORTS(N), .DEPTH(D), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] q [N][$];

  function automatic int total();
    int t = 0;
    for (int p = 0; p < N; p++) t += q[p].size();
    return t;
  endfunction

  function automatic logic [W-1:0] rnd_data();
    logic [W-1:0] d;
    for (int i = 0; i < W; i += 32) d[i +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bias;
    bit w, r;
    int wp, rp;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // alternate between filling and draining phases
      bias = ((cyc / 700) % 2 == 0) ? 95 : 30;
      w = ($urandom_range(0, 99) < bias) && (total() < D);
      wp = $urandom_range(0, N - 1);
      // reads only of non-empty queues
      r = 0;
      rp = $urandom_range(0, N - 1);
      for (int k = 0; k < N && !r; k++)
        if (q[(rp + k) % N].size() > 0 && $urandom_range(0, 99) < ((bias > 50) ? 10 : 90)) begin
          r = 1; rp = (rp + k) % N;
        end
      wr_en = w; wr_port = 3'(wp); wr_data = rnd_data();
      rd_en = r; rd_port = 3'(rp);
      #1;
      // combinational outputs before the edge
      check(occupancy == 7'(total()), "occupancy");
      check(full == (total() == D), "buffer_full");
      for (int p = 0; p < N; p++) check(q_nonempty[p] == (q[p].size() > 0), "q_nonempty");
      if (r) check(rd_data == q[rp][0], "read data is queue head");
      if (full) n_full++;
      if (w && r) n_both++;
      @(posedge clk);
      if (r) void'(q[rp].pop_front());
      if (w) q[wp].push_back(wr_data);
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    // drain everything, checking order
    for (int p = 0; p < N; p++)
      while (q[p].size() > 0) begin
        rd_en = 1; rd_port = 3'(p); #1;
        check(rd_data == q[p][0], "drain order");
        @(posedge clk); void'(q[p].pop_front()); @(negedge clk);
      end
    rd_en = 0; #1;
    check(occupancy == 0 && q_nonempty == '0, "empty after drain");
    check(n_full > 10, "buffer reached full");
    check(n_both > 100, "simultaneous write and read exercised");
    $display("full cycles=%0d, write+read cycles=%0d", n_full, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
