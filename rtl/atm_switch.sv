// atm_switch: N x N shared-memory, non-blocking ATM switch built from a
// datapath and a controller.
//
// Datapath, input to output:
//   sp_conv  x N   serial line -> parallel cell, raises cell_arrived
//   hdr_cnv  x N   routes the cell (output port) and translates VPI/VCI
//   cell_mux       merges the inputs into one stream of cells
//   shared_buffer  one cell memory, a FIFO queue per output, buffer_full
//   cell_dmux      sends a cell read from the buffer to its output
//   ps_conv  x N   parallel cell -> serial line
// The controller (switch_ctrl) moves one cell at a time through
// receive_cell, process_cell, switch_cell and transmit_cell, issuing the
// buffer's write and read and dropping a cell when the buffer is full or its
// header is unusable. perf_monitor counts arrivals, losses, delays and the
// buffer occupancy per slot.
//
// Lines carry one bit per clock (see sp_conv / ps_conv), so a slot is
// CELL_BITS = 424 clocks while the controller needs five clocks per arriving
// cell: the buffer is written much faster than any one line, as the model
// requires for all inputs to reach one output in the same slot. The buffer
// stores each cell with its arrival time stamp, taken from a free-running
// clock counter, for the delay measurement. slot_tick only paces the
// queue-length sampling. Translation tables are written through mgmt_* (the
// management system's interface): mgmt_port selects the input whose table is
// written. The block structure follows the document; the line format, cell
// format and controller timing are this design's choices.
module atm_switch
  import atm_pkg::*;
#(
  parameter int N_PORTS   = 8,
  parameter int BUF_CELLS = 100,
  parameter int TBL_DEPTH = 16,
  localparam int PW       = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int OW       = $clog2(BUF_CELLS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               slot_tick,
  input  logic [N_PORTS-1:0] rx_soc,
  input  logic [N_PORTS-1:0] rx_valid,
  input  logic [N_PORTS-1:0] rx_data,
  output logic [N_PORTS-1:0] tx_soc,
  output logic [N_PORTS-1:0] tx_valid,
  output logic [N_PORTS-1:0] tx_data,
  input  logic               mgmt_we,
  input  logic [7:0]         mgmt_port,
  input  logic [7:0]         mgmt_idx,
  input  vc_entry_t          mgmt_entry,
  input  logic               stats_clear,
  output perf_stats_t        stats,
  output logic [OW-1:0]      occupancy,
  output logic               buffer_full,
  output ctrl_state_e        ctrl_state
);

  tstamp_t now;

  atm_cell_t          sp_cell [N_PORTS];
  tstamp_t            sp_ts   [N_PORTS];
  logic [N_PORTS-1:0] cell_arrived;
  logic [N_PORTS-1:0] sp_arrived;
  logic [N_PORTS-1:0] sp_overrun;
  conv_cell_t         cnv_out [N_PORTS];
  logic [N_PORTS-1:0] cnv_load;

  conv_cell_t    mux_out;
  logic          mux_valid;
  logic [PW-1:0] mux_sel;
  logic          mux_load;

  logic          write;
  logic [PW-1:0] wr_port;
  logic          read;
  logic [PW-1:0] rd_port;
  buf_entry_t    wr_entry;
  buf_entry_t    rd_entry;
  logic [N_PORTS-1:0] q_nonempty;
  logic          drop_full;
  logic          drop_header;

  logic [N_PORTS-1:0] ps_load;
  logic [N_PORTS-1:0] ps_ready;
  atm_cell_t          ps_cell;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + TS_W'(1);
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    sp_conv u_sp (
      .clk, .rst_n,
      .rx_soc   (rx_soc[p]),
      .rx_valid (rx_valid[p]),
      .rx_data  (rx_data[p]),
      .now,
      .ack      (cnv_load[p]),
      .cell_out (sp_cell[p]),
      .ts       (sp_ts[p]),
      .ready    (cell_arrived[p]),
      .arrived  (sp_arrived[p]),
      .overrun  (sp_overrun[p])
    );
    hdr_cnv #(.N_PORTS(N_PORTS), .TBL_DEPTH(TBL_DEPTH)) u_cnv (
      .clk, .rst_n,
      .load      (cnv_load[p]),
      .cell_in   (sp_cell[p]),
      .ts_in     (sp_ts[p]),
      .tbl_we    (mgmt_we && 32'(mgmt_port) == p),
      .tbl_idx   (mgmt_idx),
      .tbl_entry (mgmt_entry),
      .out       (cnv_out[p])
    );
  end

  cell_mux #(.N_PORTS(N_PORTS)) u_mux (
    .clk, .rst_n,
    .in        (cnv_out),
    .sel       (mux_sel),
    .load      (mux_load),
    .out       (mux_out),
    .out_valid (mux_valid)
  );

  switch_ctrl #(.N_PORTS(N_PORTS)) u_ctrl (
    .clk, .rst_n,
    .cell_arrived,
    .conv_valid  (mux_valid),
    .conv_status (mux_out.status),
    .conv_port   (mux_out.out_port),
    .buffer_full,
    .q_nonempty,
    .tx_ready    (ps_ready),
    .cnv_load,
    .mux_sel,
    .mux_load,
    .write,
    .wr_port,
    .read,
    .rd_port,
    .drop_full,
    .drop_header,
    .state       (ctrl_state)
  );

  assign wr_entry = '{ts: mux_out.ts, acell: mux_out.acell};

  shared_buffer #(.N_PORTS(N_PORTS), .DEPTH(BUF_CELLS), .DATA_W($bits(buf_entry_t))) u_buf (
    .clk, .rst_n,
    .wr_en      (write),
    .wr_port,
    .wr_data    (wr_entry),
    .rd_en      (read),
    .rd_port,
    .rd_data    (rd_entry),
    .full       (buffer_full),
    .occupancy,
    .q_nonempty
  );

  cell_dmux #(.N_PORTS(N_PORTS)) u_dmux (
    .in_valid (read),
    .in_port  (rd_port),
    .in_cell  (rd_entry.acell),
    .load     (ps_load),
    .out_cell (ps_cell)
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_out
    ps_conv u_ps (
      .clk, .rst_n,
      .load     (ps_load[p]),
      .cell_in  (ps_cell),
      .ready    (ps_ready[p]),
      .tx_soc   (tx_soc[p]),
      .tx_valid (tx_valid[p]),
      .tx_data  (tx_data[p])
    );
  end

  perf_monitor #(.N_PORTS(N_PORTS), .DEPTH(BUF_CELLS)) u_perf (
    .clk, .rst_n,
    .clear       (stats_clear),
    .arrived     (sp_arrived),
    .overrun     (sp_overrun),
    .drop_full,
    .drop_header,
    .depart      (read),
    .depart_ts   (rd_entry.ts),
    .now,
    .slot_tick,
    .occupancy,
    .stats
  );

endmodule
