// perf_monitor: the performance counters built into the switch model.
//
// It counts the events from which the three measured quantities follow:
//   cell loss probability = lost_full / arrived
//   average cell delay    = delay_sum / departed   (clocks; /424 for slots)
//   average queue length  = qlen_sum / slots
// `arrived` and `overrun` are per-input pulses (several may come in one
// clock). A departure (`depart`) adds now - depart_ts, the time from complete
// arrival at the input to the start of transmission. On every slot_tick the
// buffer occupancy is added to qlen_sum and `slots` is incremented. `clear`
// restarts every counter, so averages can be taken after an initial warm-up.
// Counters wrap; their widths are this design's choice. The document gives
// the quantities and the loss ratio; the delay reference points are this
// design's choice.
module perf_monitor
  import atm_pkg::*;
#(
  parameter int N_PORTS = 8,
  parameter int DEPTH   = 100,
  localparam int OW     = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [N_PORTS-1:0] arrived,
  input  logic [N_PORTS-1:0] overrun,
  input  logic               drop_full,
  input  logic               drop_header,
  input  logic               depart,
  input  tstamp_t            depart_ts,
  input  tstamp_t            now,
  input  logic               slot_tick,
  input  logic [OW-1:0]      occupancy,
  output perf_stats_t        stats
);

  logic [31:0] n_arr;
  logic [31:0] n_ovr;

  always_comb begin
    n_arr = '0;
    n_ovr = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      n_arr = n_arr + 32'(arrived[p]);
      n_ovr = n_ovr + 32'(overrun[p]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else if (clear) begin
      stats <= '0;
    end else begin
      stats.arrived      <= stats.arrived + n_arr;
      stats.lost_overrun <= stats.lost_overrun + n_ovr;
      if (drop_full)   stats.lost_full   <= stats.lost_full + 32'd1;
      if (drop_header) stats.lost_header <= stats.lost_header + 32'd1;
      if (depart) begin
        stats.departed  <= stats.departed + 32'd1;
        stats.delay_sum <= stats.delay_sum + 48'(now - depart_ts);
      end
      if (slot_tick) begin
        stats.qlen_sum <= stats.qlen_sum + 48'(occupancy);
        stats.slots    <= stats.slots + 32'd1;
      end
    end
  end

endmodule
