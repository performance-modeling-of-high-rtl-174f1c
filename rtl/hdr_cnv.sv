// hdr_cnv: header converter (HD CNV) of one switch input.
//
// Holds a translation table of TBL_DEPTH entries written by the management
// system (tbl_we, tbl_idx, tbl_entry). Each valid entry maps an incoming
// (VPI, VCI) to an output port and a new (VPI, VCI). When `load` is high the
// block captures cell_in and produces, one clock later on `out`, the routed
// cell: the output port, the header with the new VPI/VCI and a regenerated
// HEC, the unchanged payload and the arrival time stamp. Routing and address
// translation happen in the same clock, as the document's process_cell step
// describes. The status is CNV_HEC_ERR if the incoming HEC is wrong, and
// CNV_NO_ROUTE if no valid entry matches or the entry names a port outside
// 0..N_PORTS-1; the controller discards such cells. The table is searched
// associatively and the lowest matching index wins; the table organisation,
// its size and the HEC check are this design's choices.
module hdr_cnv
  import atm_pkg::*;
#(
  parameter int N_PORTS   = 8,
  parameter int TBL_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  atm_cell_t  cell_in,
  input  tstamp_t    ts_in,
  input  logic       tbl_we,
  input  logic [7:0] tbl_idx,
  input  vc_entry_t  tbl_entry,
  output conv_cell_t out
);

  localparam int IW = (TBL_DEPTH > 1) ? $clog2(TBL_DEPTH) : 1;

  vc_entry_t table_q [TBL_DEPTH];

  logic        hit;
  vc_entry_t   match;
  atm_hdr_t    new_hdr;
  cnv_status_e status;

  always_comb begin
    hit   = 1'b0;
    match = '0;
    for (int i = TBL_DEPTH - 1; i >= 0; i--) begin
      if (table_q[i].valid && table_q[i].in_vpi == cell_in.hdr.vpi &&
          table_q[i].in_vci == cell_in.hdr.vci) begin
        hit   = 1'b1;
        match = table_q[i];
      end
    end
    new_hdr     = cell_in.hdr;
    new_hdr.vpi = match.out_vpi;
    new_hdr.vci = match.out_vci;
    new_hdr     = hdr_with_hec(new_hdr);
    if (hec_calc({cell_in.hdr.gfc, cell_in.hdr.vpi, cell_in.hdr.vci,
                  cell_in.hdr.pt, cell_in.hdr.clp}) != cell_in.hdr.hec)
      status = CNV_HEC_ERR;
    else if (!hit || 32'(match.out_port) >= N_PORTS)
      status = CNV_NO_ROUTE;
    else
      status = CNV_OK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TBL_DEPTH; i++) table_q[i] <= '0;
    end else if (tbl_we && 32'(tbl_idx) < TBL_DEPTH) begin
      table_q[tbl_idx[IW-1:0]] <= tbl_entry;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out        <= '0;
      out.status <= CNV_NO_ROUTE;
    end else if (load) begin
      out.status        <= status;
      out.out_port      <= (status == CNV_OK) ? match.out_port : 8'd0;
      out.acell.hdr     <= (status == CNV_OK) ? new_hdr : cell_in.hdr;
      out.acell.payload <= cell_in.payload;
      out.ts            <= ts_in;
    end
  end

endmodule
