// tb_perf_monitor: self-checking test of the performance counters. Drives
// random arrival/overrun pulses on several inputs at once, losses,
// departures with time stamps and slot ticks with a random occupancy, and
// compares every counter with sums kept here; checks clear.
module tb_perf_monitor;
  import atm_pkg::*;

  localparam int N = 8, D = 100;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [N-1:0] arrived = '0, overrun = '0;
  logic drop_full = 0, drop_header = 0, depart = 0, slot_tick = 0;
  tstamp_t depart_ts = '0, now = '0;
  logic [6:0] occupancy = '0;
  perf_stats_t stats;
  int checks = 0, failures = 0;

  perf_monitor #(.N_PORTS(N), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e_arr, e_ovr, e_full, e_hdr, e_dep, e_delay, e_q, e_slots;

  task automatic zero_model();
    e_arr = 0; e_ovr = 0; e_full = 0; e_hdr = 0; e_dep = 0; e_delay = 0; e_q = 0; e_slots = 0;
  endtask

  task automatic compare(input string when);
    check(stats.arrived == 32'(e_arr), {when, ": arrived"});
    check(stats.lost_overrun == 32'(e_ovr), {when, ": lost_overrun"});
    check(stats.lost_full == 32'(e_full), {when, ": lost_full"});
    check(stats.lost_header == 32'(e_hdr), {when, ": lost_header"});
    check(stats.departed == 32'(e_dep), {when, ": departed"});
    check(stats.delay_sum == 48'(e_delay), {when, ": delay_sum"});
    check(stats.qlen_sum == 48'(e_q), {when, ": qlen_sum"});
    check(stats.slots == 32'(e_slots), {when, ": slots"});
  endtask

  initial begin
    zero_model();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("after reset");
    for (int r = 0; r < 5000; r++) begin
      now = now + tstamp_t'($urandom_range(1, 5));
      arrived = N'($urandom); overrun = N'($urandom) & arrived & N'($urandom);
      drop_full = 1'($urandom); drop_header = 1'($urandom);
      depart = 1'($urandom);
      depart_ts = now - tstamp_t'($urandom_range(0, 100000));
      slot_tick = ($urandom_range(0, 9) == 0);
      occupancy = 7'($urandom_range(0, D));
      clear = (r == 2500);
      @(negedge clk);
      if (clear) zero_model();
      else begin
        e_arr += $countones(arrived); e_ovr += $countones(overrun);
        e_full += drop_full; e_hdr += drop_header;
        if (depart) begin e_dep++; e_delay += longint'(now - depart_ts); end
        if (slot_tick) begin e_slots++; e_q += occupancy; end
      end
      if (r % 100 == 0 || r == 2500) compare($sformatf("step %0d", r));
    end
    compare("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
