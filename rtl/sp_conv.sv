// sp_conv: serial-to-parallel converter (S/P) of one switch input.
//
// The line carries one bit per clock while rx_valid is high; rx_soc marks the
// first bit of a cell, and bits arrive most significant first. The bits are
// shifted into a CELL_BITS-wide register. When the last bit arrives the whole
// cell is copied, with the current time stamp `now`, into a holding register
// and `ready` (this input's cell_arrived) rises in the next clock. It stays
// high until the controller pulses `ack`, which may coincide with the
// completion of the next cell. A cell that completes while the holding
// register is still full and not being acknowledged is dropped and reported
// by a one-clock `overrun` pulse; every completed cell gives an `arrived`
// pulse. The framing signals, the holding register and the overrun rule are
// this design's choices; the document names the S/P unit only.
module sp_conv
  import atm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rx_soc,
  input  logic      rx_valid,
  input  logic      rx_data,
  input  tstamp_t   now,
  input  logic      ack,
  output atm_cell_t cell_out,
  output tstamp_t   ts,
  output logic      ready,
  output logic      arrived,
  output logic      overrun
);

  localparam int CW = $clog2(CELL_BITS + 1);

  logic [CELL_BITS-2:0] shreg;     // all bits but the newest
  logic [CW-1:0]        cnt;
  logic                 receiving;
  logic [CELL_BITS-1:0] shreg_nxt;
  logic [CW-1:0]        cnt_nxt;
  logic                 take_bit;
  logic                 complete;

  always_comb begin
    take_bit  = rx_valid && (rx_soc || receiving);
    shreg_nxt = {shreg, rx_data};
    cnt_nxt   = rx_soc ? CW'(1) : cnt + CW'(1);
    complete  = take_bit && (cnt_nxt == CW'(CELL_BITS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      receiving <= 1'b0;
      ready     <= 1'b0;
      arrived   <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      arrived <= 1'b0;
      overrun <= 1'b0;
      if (ack) ready <= 1'b0;
      if (take_bit) begin
        cnt       <= cnt_nxt;
        receiving <= !complete;
      end
      if (complete) begin
        arrived <= 1'b1;
        if (!ready || ack) ready <= 1'b1;
        else               overrun <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take_bit) shreg <= shreg_nxt[CELL_BITS-2:0];
    if (complete && (!ready || ack)) begin
      cell_out <= atm_cell_t'(shreg_nxt);
      ts   <= now;
    end
  end

endmodule
