// atm_pkg: types, constants and helper functions shared by the ATM switch
// performance model.
//
// A cell is the standard 53-byte ATM cell: a 5-byte UNI header (GFC, VPI,
// VCI, PT, CLP, HEC) followed by a 48-byte payload, 424 bits in all. Cells
// move between blocks in parallel as one packed struct, most significant bit
// (the first GFC bit) first on the serial lines. One cell slot is the time a
// line needs to carry one cell, CELL_BITS clocks at one bit per clock.
// The header layout and HEC polynomial are the ATM standard's; the record
// types for the header converter, traffic sources and statistics are this
// design's own.
package atm_pkg;

  localparam int CELL_BYTES   = 53;
  localparam int HDR_BYTES    = 5;
  localparam int CELL_BITS    = CELL_BYTES * 8;               // 424
  localparam int PAYLOAD_BITS = (CELL_BYTES - HDR_BYTES) * 8; // 384
  localparam int TS_W         = 32;                           // time stamp width

  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
    logic [7:0]  hec;
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t                 hdr;
    logic [PAYLOAD_BITS-1:0]  payload;
  } atm_cell_t;

  typedef logic [TS_W-1:0] tstamp_t;

  // Outcome of header conversion.
  typedef enum logic [1:0] {
    CNV_OK       = 2'd0,
    CNV_HEC_ERR  = 2'd1,
    CNV_NO_ROUTE = 2'd2
  } cnv_status_e;

  // One entry of a header converter's translation table.
  typedef struct packed {
    logic        valid;
    logic [7:0]  in_vpi;
    logic [15:0] in_vci;
    logic [7:0]  out_port;
    logic [7:0]  out_vpi;
    logic [15:0] out_vci;
  } vc_entry_t;

  // A cell after header conversion, as carried by the MUX.
  typedef struct packed {
    atm_cell_t   acell;
    tstamp_t     ts;        // clock at which the cell was fully received
    logic [7:0]  out_port;
    cnv_status_e status;
  } conv_cell_t;

  // What the shared buffer stores per cell.
  typedef struct packed {
    tstamp_t   ts;
    atm_cell_t acell;
  } buf_entry_t;

  // Controller states, named after the protocol states of the model.
  typedef enum logic [2:0] {
    ST_IDLE          = 3'd0,
    ST_RECEIVE_CELL  = 3'd1,
    ST_PROCESS_CELL  = 3'd2,
    ST_SWITCH_CELL   = 3'd3,
    ST_TRANSMIT_CELL = 3'd4
  } ctrl_state_e;

  // Characteristics of one bursty traffic source. Probabilities are Q0.16
  // fractions (value / 65536). A period (active or silent) takes branch 1 of
  // its geometric mixture with probability alpha, then continues after each
  // slot with probability p1 or p2 of that branch.
  typedef struct packed {
    logic        enable;
    logic [15:0] alpha_a;
    logic [15:0] p1_a;
    logic [15:0] p2_a;
    logic [15:0] alpha_s;
    logic [15:0] p1_s;
    logic [15:0] p2_s;
    logic [7:0]  k_a;      // slots between cells in an active period, >= 1
    logic [7:0]  vpi;
    logic [15:0] vci;
  } traffic_cfg_t;

  // Performance counters.
  typedef struct packed {
    logic [31:0] arrived;       // cells completely received by the S/Ps
    logic [31:0] lost_full;     // cells lost because the buffer was full
    logic [31:0] lost_header;   // cells discarded for a bad header or no route
    logic [31:0] lost_overrun;  // cells lost because an S/P was still occupied
    logic [31:0] departed;      // cells that started transmission
    logic [47:0] delay_sum;     // sum of (transmit start - arrival) in clocks
    logic [47:0] qlen_sum;      // buffer occupancy summed once per slot
    logic [31:0] slots;         // slots sampled
  } perf_stats_t;

  // Header error control: CRC-8 with generator x^8 + x^2 + x + 1 over the
  // first four header bytes, XORed with 0x55.
  function automatic logic [7:0] hec_calc(input logic [31:0] h);
    logic [7:0] crc;
    logic       fb;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      fb  = crc[7] ^ h[i];
      crc = {crc[6:0], 1'b0};
      if (fb) crc = crc ^ 8'h07;
    end
    return crc ^ 8'h55;
  endfunction

  function automatic atm_hdr_t hdr_with_hec(input atm_hdr_t h);
    atm_hdr_t r;
    r     = h;
    r.hec = hec_calc({h.gfc, h.vpi, h.vci, h.pt, h.clp});
    return r;
  endfunction

endpackage
