// tb_atm_switch: self-checking end-to-end test of the 8x8 switch with a
// 100-cell buffer. The testbench writes the translation tables, drives the
// eight serial inputs slot by slot and collects the eight serial outputs.
//  1. One cell through an empty switch: its translated header, payload,
//     output port, and latency (5 clocks from complete arrival to the read,
//     6 clocks from its last input bit to its first output bit).
//  2. Random traffic with unknown VCs, bad HECs and a hot-spot phase in
//     which all inputs send to output 0, so the buffer fills and cells are
//     lost. Every output cell must be the translated form of a sent cell
//     routed there, in per-input order; cells missing from that order must
//     equal lost_full; header drops, arrivals and departures must match the
//     counters.
module tb_atm_switch;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int N = 8, B = 100;
  logic clk = 0, rst_n = 0;
  logic slot_tick;
  logic [N-1:0] rx_soc = '0, rx_valid = '0, rx_data = '0;
  logic [N-1:0] tx_soc, tx_valid, tx_data;
  logic mgmt_we = 0;
  logic [7:0] mgmt_port = 0, mgmt_idx = 0;
  vc_entry_t mgmt_entry = '0;
  logic stats_clear = 0;
  perf_stats_t stats;
  logic [6:0] occupancy;
  logic buffer_full;
  ctrl_state_e ctrl_state;
  int checks = 0, failures = 0;

  atm_switch #(.N_PORTS(N), .BUF_CELLS(B), .TBL_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int slot_cnt = 0;
  always @(posedge clk) slot_cnt <= (slot_cnt == CELL_BITS - 1) ? 0 : slot_cnt + 1;
  assign slot_tick = (slot_cnt == 0);

  // ---------------- translation tables (reference copy kept here)
  vc_entry_t tbl [N][16];

  task automatic set_entry(input int p, input int i, input vc_entry_t e);
    @(negedge clk);
    mgmt_we = 1; mgmt_port = 8'(p); mgmt_idx = 8'(i); mgmt_entry = e;
    @(negedge clk);
    mgmt_we = 0;
    tbl[p][i] = e;
  endtask

  // expected translation: returns output port or -1 for a discarded cell
  function automatic int route(input int p, input atm_cell_t c, output atm_cell_t t);
    t = c;
    if (ref_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pt, c.hdr.clp}) != c.hdr.hec) return -1;
    for (int i = 0; i < 16; i++)
      if (tbl[p][i].valid && tbl[p][i].in_vpi == c.hdr.vpi && tbl[p][i].in_vci == c.hdr.vci) begin
        if (tbl[p][i].out_port >= N) return -1;
        t.hdr.vpi = tbl[p][i].out_vpi;
        t.hdr.vci = tbl[p][i].out_vci;
        t.hdr.hec = ref_hec({t.hdr.gfc, t.hdr.vpi, t.hdr.vci, t.hdr.pt, t.hdr.clp});
        return tbl[p][i].out_port;
      end
    return -1;
  endfunction

  // ---------------- scoreboard
  atm_cell_t exp_q [N][N][$];   // [input][output]
  int n_sent = 0, n_bad = 0, n_recv = 0, n_skipped = 0, n_unmatched = 0;
  longint first_out_time [N];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- input drivers: one cell per input per slot
  atm_cell_t slot_cell [N];
  logic [N-1:0] slot_has;

  task automatic send_slot();
    // wait for the start of a slot, then drive all lines for 424 clocks
    while (slot_cnt != 1) @(negedge clk);
    for (int b = CELL_BITS - 1; b >= 0; b--) begin
      for (int p = 0; p < N; p++) begin
        rx_valid[p] = slot_has[p];
        rx_soc[p]   = slot_has[p] && (b == CELL_BITS - 1);
        rx_data[p]  = slot_has[p] ? slot_cell[p][b] : 1'($urandom);
      end
      @(negedge clk);
    end
    rx_valid = '0; rx_soc = '0;
  endtask

  task automatic plan(input int p, input atm_cell_t c);
    atm_cell_t t;
    int o;
    slot_has[p] = 1;
    slot_cell[p] = c;
    n_sent++;
    o = route(p, c, t);
    if (o < 0) n_bad++;
    else exp_q[p][o].push_back(t);
  endtask

  // ---------------- output collectors
  logic [CELL_BITS-1:0] osh [N];
  int onb [N];
  always @(negedge clk) begin
    for (int o = 0; o < N; o++) if (tx_valid[o]) begin
      if (tx_soc[o]) begin onb[o] = 0; first_out_time[o] = cyc; end
      osh[o] = {osh[o][CELL_BITS-2:0], tx_data[o]};
      onb[o]++;
      if (onb[o] == CELL_BITS) begin
        atm_cell_t c;
        bit found;
        c = atm_cell_t'(osh[o]);
        onb[o] = 0;
        n_recv++;
        found = 0;
        for (int p = 0; p < N && !found; p++)
          for (int k = 0; k < exp_q[p][o].size() && !found; k++)
            if (exp_q[p][o][k] == c) begin
              found = 1;
              n_skipped += k;
              for (int j = 0; j <= k; j++) void'(exp_q[p][o].pop_front());
            end
        if (!found) n_unmatched++;
      end
    end
  end

  // ---------------- mechanisms seen
  int n_full_cycles = 0;
  always @(posedge clk) if (buffer_full) n_full_cycles++;

  initial begin
    repeat (600 * CELL_BITS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    atm_cell_t c, t;
    longint last_in;
    int o;
    for (int p = 0; p < N; p++) begin
      onb[p] = 0;
      for (int i = 0; i < 16; i++) tbl[p][i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // tables: VPI 1 / VCI 100+p -> output (p+3)%8; VPI 2 / VCI 7 -> output 0;
    // VPI 3 / VCI 9 -> port 9 (does not exist)
    for (int p = 0; p < N; p++) begin
      set_entry(p, 0, '{valid: 1, in_vpi: 8'd1, in_vci: 16'(100 + p), out_port: 8'((p + 3) % N),
                         out_vpi: 8'(8'h40 + p), out_vci: 16'(16'h1000 + p)});
      set_entry(p, 3, '{valid: 1, in_vpi: 8'd2, in_vci: 16'd7, out_port: 8'd0,
                         out_vpi: 8'h77, out_vci: 16'(16'h2000 + p)});
      set_entry(p, 15, '{valid: 1, in_vpi: 8'd3, in_vci: 16'd9, out_port: 8'd9,
                          out_vpi: 8'h00, out_vci: 16'h0000});
    end
    // 1. a single cell on input 2
    slot_has = '0;
    c = make_cell(8'd1, 16'd102, 32'hCAFE);
    plan(2, c);
    send_slot();
    last_in = cyc - 1;
    repeat (CELL_BITS + 20) @(negedge clk);
    o = route(2, c, t);
    check(o == 5, "reference route of input 2");
    check(n_recv == 1 && n_unmatched == 0 && exp_q[2][5].size() == 0,
          $sformatf("single cell translated and delivered on output 5 (recv %0d unmatched %0d)", n_recv, n_unmatched));
    check(first_out_time[5] - last_in == 6, $sformatf("6 clocks from last input bit to first output bit (got %0d)", first_out_time[5] - last_in));
    check(stats.delay_sum == 48'd5 && stats.departed == 1, "delay counter = 5 clocks");
    // 2. random traffic with a hot-spot phase
    for (int s = 0; s < 300; s++) begin
      slot_has = '0;
      for (int p = 0; p < N; p++) begin
        int kind;
        kind = $urandom_range(0, 99);
        if (s >= 60 && s < 110) begin
          plan(p, make_cell(8'd2, 16'd7, $urandom));                // everyone to output 0
        end else if (kind < 45) begin
          plan(p, make_cell(8'd1, 16'(100 + p), $urandom));
        end else if (kind < 55) begin
          plan(p, make_cell(8'd2, 16'd7, $urandom));
        end else if (kind < 58) begin
          plan(p, make_cell(8'd3, 16'd9, $urandom));                // no such port
        end else if (kind < 61) begin
          plan(p, make_cell(8'd5, 16'd55, $urandom));               // unknown VC
        end else if (kind < 64) begin
          plan(p, make_cell(8'd1, 16'(100 + p), $urandom, 0));      // bad HEC
        end
      end
      send_slot();
    end
    slot_has = '0;
    // drain
    repeat (120) send_slot();
    check(occupancy == 0, "buffer drained");
    check(n_unmatched == 0, "every output cell is a translated input cell in per-input order");
    begin
      int left = 0;
      for (int p = 0; p < N; p++) for (int q = 0; q < N; q++) left += exp_q[p][q].size();
      n_skipped += left;
    end
    check(n_full_cycles > 0, "buffer became full");
    check(stats.lost_full > 0, "cells lost to a full buffer");
    check(stats.lost_full == 32'(n_skipped), $sformatf("lost_full %0d = cells missing from outputs %0d", stats.lost_full, n_skipped));
    check(stats.lost_header == 32'(n_bad), "header drops counted");
    check(stats.arrived == 32'(n_sent), "arrivals counted");
    check(stats.departed == 32'(n_recv), "departures counted");
    check(stats.lost_overrun == 0, "no S/P overrun");
    check(stats.arrived == stats.departed + stats.lost_full + stats.lost_header, "cell conservation");
    $display("sent=%0d received=%0d lost_full=%0d lost_header=%0d full_cycles=%0d",
             n_sent, n_recv, stats.lost_full, stats.lost_header, n_full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
