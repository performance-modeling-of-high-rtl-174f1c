// cell_mux: the multiplexer (MUX) that merges the converted cells of all
// inputs into the single stream written to the shared buffer.
//
// The controller serves one input at a time: when `load` is high the cell of
// input `sel` is registered on `out`, and `out_valid` is high for the next
// clock. Because cells are parallel here, the delay a cell sees in the MUX is
// one clock plus the clocks spent serving the inputs ahead of it, so it grows
// with the number of inputs as the document states. The register and the
// valid flag are this design's choices.
module cell_mux
  import atm_pkg::*;
#(
  parameter int N_PORTS = 8,
  localparam int PW     = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  conv_cell_t    in [N_PORTS],
  input  logic [PW-1:0] sel,
  input  logic          load,
  output conv_cell_t    out,
  output logic          out_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out        <= '0;
      out.status <= CNV_NO_ROUTE;
    end else begin
      out_valid <= load;
      if (load) out <= in[sel];
    end
  end

endmodule
