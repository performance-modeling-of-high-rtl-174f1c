// tb_atm_perf_top: end-to-end test of the complete model at its default
// size (8 inputs, 100-cell buffer, 16-entry tables).
//
// Phase A - tagged output: sources 0..6 send bursty traffic (m(A) = 25,
// m(S) = 37, c^2 = 4.5, k(A) = 2, load 0.2 each, so output 0 is offered
// 1.4 cells per slot) through their tables to output 0; source 7's VC points at a port that does not exist, so its
// cells are discarded as header errors. The buffer fills and cells are lost.
// Phase B - after the switch has drained, the management interface
// re-points source 7 to output 3 and the counters are cleared; its cells must now appear on output 3.
// Every output cell is checked: translated VPI/VCI, valid HEC, source
// number and increasing sequence number. The counters must balance
// (arrived = departed + lost), and each mechanism - bursty periods, all
// five controller states, the idle -> transmit_cell path, buffer_full,
// loss to a full buffer, header discard, statistics clear, table update and
// transmission on two outputs - must occur at least once.
module tb_atm_perf_top;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int N = 8;
  localparam int SLOTS_A = 3000, SLOTS_B = 1000;
  logic clk = 0, rst_n = 0;
  traffic_cfg_t traffic_cfg [N];
  logic mgmt_we = 0;
  logic [7:0] mgmt_port = 0, mgmt_idx = 0;
  vc_entry_t mgmt_entry = '0;
  logic stats_clear = 0;
  logic [N-1:0] tx_soc, tx_valid, tx_data;
  perf_stats_t stats;
  logic [6:0] occupancy;
  logic buffer_full;
  ctrl_state_e ctrl_state;
  logic slot_tick;
  logic [N-1:0] src_active, src_cell_sent;
  int checks = 0, failures = 0;

  atm_perf_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic set_entry(input int p, input int i, input vc_entry_t e);
    @(negedge clk);
    mgmt_we = 1; mgmt_port = 8'(p); mgmt_idx = 8'(i); mgmt_entry = e;
    @(negedge clk);
    mgmt_we = 0;
  endtask

  // ---------------- mechanism counters
  int n_state [5];
  int n_idle_to_tx = 0, n_full = 0, n_drop_full = 0, n_drop_hdr = 0;
  int n_period_switch = 0, n_sent = 0;
  ctrl_state_e prev_state = ST_IDLE;
  logic [N-1:0] prev_active = '0;
  always @(posedge clk) if (rst_n) begin
    n_state[int'(ctrl_state)]++;
    if (prev_state == ST_IDLE && ctrl_state == ST_TRANSMIT_CELL) n_idle_to_tx++;
    prev_state <= ctrl_state;
    if (buffer_full) n_full++;
    if (dut.u_switch.drop_full) n_drop_full++;
    if (dut.u_switch.drop_header) n_drop_hdr++;
    n_period_switch += $countones(src_active ^ prev_active);
    prev_active <= src_active;
    n_sent += $countones(src_cell_sent);
  end

  // ---------------- output checkers
  logic [CELL_BITS-1:0] osh [N];
  int onb [N];
  int recv [N];
  int bad = 0;
  logic [31:0] last_seq [N];
  bit seen_src [N];
  bit phase_b = 0;
  int recv7_on3 = 0;
  always @(negedge clk) begin
    for (int o = 0; o < N; o++) if (tx_valid[o]) begin
      if (tx_soc[o]) onb[o] = 0;
      osh[o] = {osh[o][CELL_BITS-2:0], tx_data[o]};
      onb[o]++;
      if (onb[o] == CELL_BITS) begin
        atm_cell_t c;
        int s;
        logic [31:0] sq;
        c = atm_cell_t'(osh[o]);
        onb[o] = 0;
        recv[o]++;
        s  = int'(c.payload[383:376]);
        sq = c.payload[375:344];
        if (s >= N || c.hdr.hec != ref_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pt, c.hdr.clp}) ||
            c.hdr.vpi != 8'(8'h50 + s) || c.hdr.vci != 16'(16'h3000 + s) ||
            c.payload[7:0] != sq[7:0]) begin
          bad++;
        end else begin
          if (seen_src[s] && sq <= last_seq[s]) bad++;
          seen_src[s] = 1;
          last_seq[s] = sq;
          if (s == 7 && o != 3) bad++;
          if (s != 7 && o != 0) bad++;
          if (s == 7) recv7_on3++;
        end
      end
    end
  end

  initial begin
    repeat ((SLOTS_A + SLOTS_B + 600) * CELL_BITS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real loss, delay, qlen;
    for (int p = 0; p < N; p++) begin
      traffic_cfg[p] = make_cfg(25.0, 37.0, 4.5, 4.5, 2, 8'd1, 16'(32 + p));
      traffic_cfg[p].enable = 0;
      onb[p] = 0; recv[p] = 0; seen_src[p] = 0; last_seq[p] = 0;
    end
    for (int s = 0; s < 5; s++) n_state[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // tables: source p's VC (1, 32+p) -> output 0 as (0x50+p, 0x3000+p);
    // source 7 -> port 9, which does not exist
    for (int p = 0; p < N; p++)
      set_entry(p, 2, '{valid: 1, in_vpi: 8'd1, in_vci: 16'(32 + p),
                        out_port: (p == 7) ? 8'd9 : 8'd0,
                        out_vpi: 8'(8'h50 + p), out_vci: 16'(16'h3000 + p)});
    for (int p = 0; p < N; p++) traffic_cfg[p].enable = 1;
    // ---------------- phase A
    repeat (SLOTS_A * CELL_BITS) @(posedge clk);
    loss  = real'(stats.lost_full) / stats.arrived;
    delay = real'(stats.delay_sum) / stats.departed / CELL_BITS;
    qlen  = real'(stats.qlen_sum) / stats.slots;
    $display("phase A: arrived=%0d lost_full=%0d lost_header=%0d departed=%0d loss=%0.4f delay=%0.2f slots qlen=%0.2f",
             stats.arrived, stats.lost_full, stats.lost_header, stats.departed, loss, delay, qlen);
    check(stats.lost_header > 0 && recv[3] == 0, "source 7 discarded as header error");
    check(stats.lost_full > 0, "cells lost to a full buffer");
    check(recv[0] > SLOTS_A / 3, "tagged output carries traffic");
    check(qlen > 1.0 && delay > 1.0, "queueing observed");
    check(stats.arrived + 8 >= stats.departed + stats.lost_full + stats.lost_header + 32'(occupancy) &&
          stats.arrived <= stats.departed + stats.lost_full + stats.lost_header + 32'(occupancy) + 8,
          "phase A counters balance within the cells in flight");
    // ---------------- phase B: let the switch empty, update a table, clear
    for (int p = 0; p < N; p++) traffic_cfg[p].enable = 0;
    repeat (150 * CELL_BITS) @(posedge clk);
    check(occupancy == 0, "switch drained after phase A");
    for (int p = 0; p < N; p++) traffic_cfg[p].enable = 1;
    set_entry(7, 2, '{valid: 1, in_vpi: 8'd1, in_vci: 16'd39, out_port: 8'd3,
                      out_vpi: 8'h57, out_vci: 16'h3007});
    @(negedge clk) stats_clear = 1;
    @(negedge clk) stats_clear = 0;
    check(stats.arrived <= 8 && stats.departed <= 1, "counters cleared");
    repeat (SLOTS_B * CELL_BITS) @(posedge clk);
    check(recv7_on3 > 20, "source 7 re-routed to output 3");
    // ---------------- drain
    for (int p = 0; p < N; p++) traffic_cfg[p].enable = 0;
    repeat (150 * CELL_BITS) @(posedge clk);
    check(occupancy == 0 && tx_valid == '0, "switch drained");
    check(bad == 0, $sformatf("output cells translated, intact and in order (%0d bad)", bad));
    check(stats.arrived == stats.departed + stats.lost_full + stats.lost_header + stats.lost_overrun,
          "counters balance after drain");
    check(stats.lost_overrun == 0, "no S/P overrun");
    // ---------------- mechanisms
    check(n_period_switch > 100, "bursty active/silent periods");
    check(n_sent > 1000, "cells generated");
    for (int s = 0; s < 5; s++)
      check(n_state[s] > 0, $sformatf("controller state %s visited", ctrl_state_e'(s)));
    check(n_idle_to_tx > 0, "idle -> transmit_cell path");
    check(n_full > 0, "buffer_full raised");
    check(n_drop_full > 0, "cell lost in switch_cell");
    check(n_drop_hdr > 0, "header discard");
    check(recv[0] > 0 && recv[3] > 0, "transmission on two outputs");
    $display("mechanisms: period switches=%0d cells=%0d idle->transmit=%0d full clocks=%0d drop_full=%0d drop_header=%0d out0=%0d out3=%0d",
             n_period_switch, n_sent, n_idle_to_tx, n_full, n_drop_full, n_drop_hdr, recv[0], recv[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
