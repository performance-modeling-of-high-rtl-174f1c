// tb_workloads: runs the three tagged-output experiments of the model on
// the complete design, shortened to SLOTS slots per point.
//
// All eight sources send to output 0 with m(A) = 25, k(A) = 4 and
// c^2(A) = c^2(S); the total load rho is set through the silent period,
// m(S) = 25 * (8 / (4 rho)) - 25 (rho = 0.8 gives m(S) = 37 as in the
// loss experiment). Points:
//   loss vs buffer size  : rho = 0.8, c^2 = 1.1, 2.7 and 4.5, buffers of
//                          100 and 30 cells
//   delay / queue vs load: buffer 100, c^2 = 1.1 at rho = 0.1, 0.3, 0.5,
//                          0.7, 0.9; c^2 = 2.7 at rho = 0.5 and 0.9
// Each point resets the design, runs WARMUP slots, clears the counters and
// runs SLOTS slots, then prints loss probability, mean delay (slots) and
// mean queue length. Checks: the offered load is near rho, no cell is lost
// for a reason other than a full buffer, and the trends the experiments
// show hold - delay and queue length grow with load, a smaller buffer loses
// at least as many cells, a larger c^2 loses more cells and gives a longer
// delay at load 0.9.
module tb_workloads;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int N = 8, SLOTS = 3000, WARMUP = 200;
  logic clk = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // two instances: default (100-cell) buffer and a 30-cell buffer
  logic rst_n [2];
  traffic_cfg_t cfg [2][N];
  logic mgmt_we [2];
  logic [7:0] mgmt_port [2], mgmt_idx [2];
  vc_entry_t mgmt_entry [2];
  logic stats_clear [2];
  logic [N-1:0] tx_soc [2], tx_valid [2], tx_data [2];
  perf_stats_t stats [2];
  logic [6:0] occ100;
  logic [4:0] occ30;
  logic full [2];
  ctrl_state_e st [2];
  logic tick [2];
  logic [N-1:0] act [2], sent [2];

  atm_perf_top u100 (
    .clk, .rst_n(rst_n[0]), .traffic_cfg(cfg[0]), .mgmt_we(mgmt_we[0]), .mgmt_port(mgmt_port[0]),
    .mgmt_idx(mgmt_idx[0]), .mgmt_entry(mgmt_entry[0]), .stats_clear(stats_clear[0]),
    .tx_soc(tx_soc[0]), .tx_valid(tx_valid[0]), .tx_data(tx_data[0]), .stats(stats[0]),
    .occupancy(occ100), .buffer_full(full[0]), .ctrl_state(st[0]), .slot_tick(tick[0]),
    .src_active(act[0]), .src_cell_sent(sent[0]));

  atm_perf_top #(.BUF_CELLS(30)) u30 (
    .clk, .rst_n(rst_n[1]), .traffic_cfg(cfg[1]), .mgmt_we(mgmt_we[1]), .mgmt_port(mgmt_port[1]),
    .mgmt_idx(mgmt_idx[1]), .mgmt_entry(mgmt_entry[1]), .stats_clear(stats_clear[1]),
    .tx_soc(tx_soc[1]), .tx_valid(tx_valid[1]), .tx_data(tx_data[1]), .stats(stats[1]),
    .occupancy(occ30), .buffer_full(full[1]), .ctrl_state(st[1]), .slot_tick(tick[1]),
    .src_active(act[1]), .src_cell_sent(sent[1]));

  initial begin
    repeat (16 * (SLOTS + WARMUP + 50) * CELL_BITS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one point on instance i; returns loss, delay (slots), queue length.
  task automatic run_point(input int i, input real rho, input real c2,
                           output real loss, output real delay, output real qlen);
    real m_s;
    perf_stats_t s;
    m_s = 25.0 * (8.0 / (4.0 * rho)) - 25.0;
    @(negedge clk);
    rst_n[i] = 0; mgmt_we[i] = 0; stats_clear[i] = 0;
    mgmt_port[i] = 0; mgmt_idx[i] = 0; mgmt_entry[i] = '0;
    for (int p = 0; p < N; p++) begin
      cfg[i][p] = make_cfg(25.0, m_s, c2, c2, 4, 8'd1, 16'(64 + p));
      cfg[i][p].enable = 0;
    end
    repeat (3) @(negedge clk);
    rst_n[i] = 1;
    for (int p = 0; p < N; p++) begin
      mgmt_we[i] = 1; mgmt_port[i] = 8'(p); mgmt_idx[i] = 8'd0;
      mgmt_entry[i] = '{valid: 1, in_vpi: 8'd1, in_vci: 16'(64 + p), out_port: 8'd0,
                        out_vpi: 8'd9, out_vci: 16'(p)};
      @(negedge clk);
    end
    mgmt_we[i] = 0;
    for (int p = 0; p < N; p++) cfg[i][p].enable = 1;
    repeat (WARMUP * CELL_BITS) @(negedge clk);
    stats_clear[i] = 1;
    @(negedge clk);
    stats_clear[i] = 0;
    repeat (SLOTS * CELL_BITS) @(negedge clk);
    s = stats[i];
    loss  = (s.arrived == 0) ? 0.0 : real'(s.lost_full) / s.arrived;
    delay = (s.departed == 0) ? 0.0 : real'(s.delay_sum) / s.departed / CELL_BITS;
    qlen  = (s.slots == 0) ? 0.0 : real'(s.qlen_sum) / s.slots;
    $display("buffer %0d rho=%0.1f c2=%0.1f m(S)=%0.1f: arrived=%0d offered=%0.3f loss=%0.4f delay=%0.2f slots queue=%0.2f",
             (i == 0) ? 100 : 30, rho, c2, m_s, s.arrived, real'(s.arrived) / SLOTS, loss, delay, qlen);
    check(s.arrived > 0 && s.departed > 0, "traffic flowed");
    check(s.lost_header == 0 && s.lost_overrun == 0, "no header or overrun losses");
    check(real'(s.arrived) / SLOTS > rho * 0.6 && real'(s.arrived) / SLOTS < rho * 1.4,
          "offered load near rho");
    for (int p = 0; p < N; p++) cfg[i][p].enable = 0;
  endtask

  initial begin
    real l100 [3], l30 [3], d, q;
    real c2s [3] = '{1.1, 2.7, 4.5};
    real rhos [5] = '{0.1, 0.3, 0.5, 0.7, 0.9};
    real dl [5], ql [5], l;
    real d5b, q5b, d9b, q9b;
    rst_n[0] = 0; rst_n[1] = 0;
    // loss vs buffer size (rho = 0.8)
    for (int k = 0; k < 3; k++) begin
      run_point(0, 0.8, c2s[k], l100[k], d, q);
      run_point(1, 0.8, c2s[k], l30[k], d, q);
      check(l30[k] >= l100[k], $sformatf("30-cell buffer loses at least as much as 100 (c^2 %0.1f)", c2s[k]));
    end
    check(l30[2] > l30[0], "loss grows with c^2 (30-cell buffer)");
    check(l30[2] > 0.0, "cells lost with a 30-cell buffer");
    // delay and queue length vs load (buffer 100)
    for (int k = 0; k < 5; k++) run_point(0, rhos[k], 1.1, l, dl[k], ql[k]);
    run_point(0, 0.5, 2.7, l, d5b, q5b);
    run_point(0, 0.9, 2.7, l, d9b, q9b);
    for (int k = 1; k < 5; k++) begin
      check(dl[k] > dl[k-1], $sformatf("delay grows with load (%0.1f -> %0.1f)", rhos[k-1], rhos[k]));
      check(ql[k] > ql[k-1], $sformatf("queue length grows with load (%0.1f -> %0.1f)", rhos[k-1], rhos[k]));
    end
    check(d9b > dl[4], "larger c^2 gives longer delay at load 0.9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
