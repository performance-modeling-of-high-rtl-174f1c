// ps_conv: parallel-to-serial converter (P/S) of one switch output.
//
// A cell presented with `load` is sent on the line one bit per clock, most
// significant bit first, starting in the clock after the load: tx_valid is
// high for CELL_BITS clocks and tx_soc marks the first of them. `ready` is
// high while the converter is idle and also during the last bit of a cell, so
// a cell loaded then follows without a gap and the line can carry one cell per
// slot. A load while not ready is a protocol error (assertion). The line
// format is this design's choice; the document names the P/S unit only.
module ps_conv
  import atm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  atm_cell_t cell_in,
  output logic      ready,
  output logic      tx_soc,
  output logic      tx_valid,
  output logic      tx_data
);

  localparam int CW = $clog2(CELL_BITS);

  logic [CELL_BITS-1:0] shreg;
  logic [CW-1:0]        cnt;     // index of the bit on the line

  assign ready    = !tx_valid || (cnt == CW'(CELL_BITS - 1));
  assign tx_data  = shreg[CELL_BITS-1];
  assign tx_soc   = tx_valid && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_valid <= 1'b0;
      cnt      <= '0;
      shreg    <= '0;
    end else if (load) begin
      tx_valid <= 1'b1;
      cnt      <= '0;
      shreg    <= cell_in;
    end else if (tx_valid) begin
      shreg <= {shreg[CELL_BITS-2:0], 1'b0};
      if (cnt == CW'(CELL_BITS - 1)) begin
        tx_valid <= 1'b0;
        cnt      <= '0;
      end else begin
        cnt <= cnt + CW'(1);
      end
    end
  end

  a_load_when_ready: assert property (@(posedge clk) disable iff (!rst_n) load |-> ready)
    else $error("ps_conv: load while busy");

endmodule
