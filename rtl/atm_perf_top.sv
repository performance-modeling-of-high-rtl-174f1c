// atm_perf_top: the complete performance model - one bursty traffic source
// per input feeding the N x N shared-memory ATM switch.
//
// A slot timer divides the clock into slots of CELL_BITS (424) clocks and
// pulses slot_tick in the first clock of each slot. On each tick every
// enabled traffic_source decides whether it sends a cell in the coming slot
// and, if so, sends it bit-serially to its switch input. The switch routes
// the cells through its translation tables (written via mgmt_*), queues them
// in the shared buffer, sends them on tx_* and keeps the performance counters
// on `stats` (see perf_monitor for how loss probability, mean delay and mean
// queue length follow from them). traffic_cfg holds each source's period
// distributions, cell spacing and VPI/VCI. The management system that writes
// the tables and reads the counters is outside this module. The combination
// of traffic model and switch follows the document; the slot timer and all
// signal formats are this design's choices.
module atm_perf_top
  import atm_pkg::*;
#(
  parameter int N_PORTS   = 8,
  parameter int BUF_CELLS = 100,
  parameter int TBL_DEPTH = 16,
  localparam int OW       = $clog2(BUF_CELLS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  traffic_cfg_t       traffic_cfg [N_PORTS],
  input  logic               mgmt_we,
  input  logic [7:0]         mgmt_port,
  input  logic [7:0]         mgmt_idx,
  input  vc_entry_t          mgmt_entry,
  input  logic               stats_clear,
  output logic [N_PORTS-1:0] tx_soc,
  output logic [N_PORTS-1:0] tx_valid,
  output logic [N_PORTS-1:0] tx_data,
  output perf_stats_t        stats,
  output logic [OW-1:0]      occupancy,
  output logic               buffer_full,
  output ctrl_state_e        ctrl_state,
  output logic               slot_tick,
  output logic [N_PORTS-1:0] src_active,
  output logic [N_PORTS-1:0] src_cell_sent
);

  localparam int SW = $clog2(CELL_BITS);

  logic [SW-1:0]      slot_cnt;
  logic [N_PORTS-1:0] rx_soc;
  logic [N_PORTS-1:0] rx_valid;
  logic [N_PORTS-1:0] rx_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot_cnt <= '0;
    else        slot_cnt <= (slot_cnt == SW'(CELL_BITS - 1)) ? '0 : slot_cnt + SW'(1);
  end
  assign slot_tick = (slot_cnt == '0);

  for (genvar p = 0; p < N_PORTS; p++) begin : g_src
    traffic_source #(
      .SEED   (64'h9E37_79B9_7F4A_7C15 ^ (64'(p + 1) * 64'h0000_0001_0000_0F3B)),
      .SRC_ID (8'(p))
    ) u_src (
      .clk, .rst_n,
      .cfg       (traffic_cfg[p]),
      .slot_tick,
      .tx_soc    (rx_soc[p]),
      .tx_valid  (rx_valid[p]),
      .tx_data   (rx_data[p]),
      .active    (src_active[p]),
      .cell_sent (src_cell_sent[p]),
      .seq       ()
    );
  end

  atm_switch #(.N_PORTS(N_PORTS), .BUF_CELLS(BUF_CELLS), .TBL_DEPTH(TBL_DEPTH)) u_switch (
    .clk, .rst_n,
    .slot_tick,
    .rx_soc, .rx_valid, .rx_data,
    .tx_soc, .tx_valid, .tx_data,
    .mgmt_we, .mgmt_port, .mgmt_idx, .mgmt_entry,
    .stats_clear,
    .stats,
    .occupancy,
    .buffer_full,
    .ctrl_state
  );

endmodule
