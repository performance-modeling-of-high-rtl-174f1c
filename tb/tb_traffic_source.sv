// tb_traffic_source: self-checking test of the bursty traffic source.
// With m(A) = 25, m(S) = 37, c^2 = 1.1 and k(A) = 4 (the document's
// Figure 4 setting) it runs 40000 slots and checks every cell on the line
// (header, HEC, source number, sequence number, payload), that cells come
// only in active periods and exactly k(A) slots apart inside one, and that
// the measured offered load, mean active and silent period lengths and the
// squared coefficient of variation of the active periods are close to the
// configured values. A second run with c^2 = 4.5 must give a clearly larger
// variation, and a disabled source must send nothing.
module tb_traffic_source;
  import atm_pkg::*;
  import tb_pkg::*;

  localparam int SLOTS = 40000;
  logic clk = 0, rst_n = 0;
  traffic_cfg_t cfg;
  logic slot_tick;
  logic tx_soc, tx_valid, tx_data, active, cell_sent;
  logic [31:0] seq;
  int checks = 0, failures = 0;

  traffic_source #(.SEED(64'h0123_4567_89AB_CDEF), .SRC_ID(8'd5)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // slot timer
  int slot_cnt = 0;
  longint slot_no = 0;
  always @(posedge clk) if (rst_n) begin
    slot_cnt <= (slot_cnt == CELL_BITS - 1) ? 0 : slot_cnt + 1;
    if (slot_cnt == CELL_BITS - 1) slot_no <= slot_no + 1;
  end
  assign slot_tick = rst_n && (slot_cnt == 0);

  // line receiver (samples mid-clock)
  logic [CELL_BITS-1:0] sh;
  int nbits = 0, ncells = 0, bad_cells = 0;
  logic [31:0] exp_seq = 0;
  always @(negedge clk) if (tx_valid) begin
    if (tx_soc) nbits = 0;
    sh = {sh[CELL_BITS-2:0], tx_data};
    nbits++;
    if (nbits == CELL_BITS) begin
      atm_cell_t c;
      c = atm_cell_t'(sh);
      if (c.hdr.vpi != cfg.vpi || c.hdr.vci != cfg.vci ||
          c.hdr.hec != ref_hec({c.hdr.gfc, c.hdr.vpi, c.hdr.vci, c.hdr.pt, c.hdr.clp}) ||
          c.payload[383:376] != 8'd5 || c.payload[375:344] != exp_seq ||
          c.payload[7:0] != exp_seq[7:0])
        bad_cells++;
      exp_seq++;
      ncells++;
      nbits = 0;
    end
  end

  // period statistics, sampled on each slot tick (state for the coming slot)
  longint n_act, n_sil, sum_act, sum_sil, sumsq_act;
  int cur_len, cells_in_active, bad_spacing, last_cell_slot;
  bit cur_state, seen_first;
  int sent_in_silent;

  task automatic reset_stats();
    n_act = 0; n_sil = 0; sum_act = 0; sum_sil = 0; sumsq_act = 0;
    cur_len = 0; bad_spacing = 0; last_cell_slot = -1000; seen_first = 0;
    sent_in_silent = 0; ncells = 0; cells_in_active = 0;
  endtask

  always @(negedge clk) if (rst_n && slot_tick === 1'b0 && slot_cnt == 1) begin
    // one clock after the tick: `active` and `cell_sent` describe this slot
    if (!seen_first) begin seen_first = 1; cur_state = active; cur_len = 1; end
    else if (active == cur_state) cur_len++;
    else begin
      if (cur_state) begin n_act++; sum_act += cur_len; sumsq_act += longint'(cur_len) * cur_len; end
      else begin n_sil++; sum_sil += cur_len; end
      cur_state = active; cur_len = 1;
      last_cell_slot = -1000;
    end
    if (cell_sent) begin
      if (!active) sent_in_silent++;
      if (last_cell_slot >= 0 && int'(slot_no) - last_cell_slot != cfg.k_a) bad_spacing++;
      last_cell_slot = int'(slot_no);
    end
  end

  initial begin
    repeat (SLOTS * CELL_BITS * 3) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real c2, input real tol, output real c2_meas);
    real m_act, m_sil, load, var_act;
    rst_n = 0;
    cfg = make_cfg(25.0, 37.0, c2, c2, 4, 8'h21, 16'h0042);
    exp_seq = 0;
    reset_stats();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (SLOTS * CELL_BITS) @(posedge clk);
    m_act = real'(sum_act) / n_act;
    m_sil = real'(sum_sil) / n_sil;
    var_act = real'(sumsq_act) / n_act - m_act * m_act;
    c2_meas = var_act / (m_act * m_act);
    load = real'(ncells) / SLOTS;
    $display("c2=%0.1f: cells=%0d load=%0.4f (expect %0.4f) m(A)=%0.2f m(S)=%0.2f c2(A)=%0.2f",
             c2, ncells, load, 25.0 / 62.0 / 4.0, m_act, m_sil, c2_meas);
    check(bad_cells == 0, "cell contents");
    check(sent_in_silent == 0, "no cells in silent periods");
    check(bad_spacing == 0, "cells k(A) slots apart in an active period");
    check(seq == 32'(ncells) || seq == 32'(ncells + 1), "sequence counter");
    check(load > 0.1008 * (1.0 - tol) && load < 0.1008 * (1.0 + tol), "offered load m(A)/(m(A)+m(S))/k(A)");
    check(m_act > 25.0 * (1.0 - tol) && m_act < 25.0 * (1.0 + tol), "mean active period");
    check(m_sil > 37.0 * (1.0 - tol) && m_sil < 37.0 * (1.0 + tol), "mean silent period");
  endtask

  initial begin
    real c2a, c2b;
    run(1.1, 0.1, c2a);
    check(c2a > 0.8 && c2a < 1.4, "c^2 of active periods near 1.1");
    run(4.5, 0.25, c2b);
    check(c2b > 3.0 && c2b < 6.0, "c^2 of active periods near 4.5");
    // disabled source
    cfg.enable = 0;
    ncells = 0;
    repeat (50 * CELL_BITS) @(posedge clk);
    check(ncells <= 1, "disabled source stops after the cell in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
