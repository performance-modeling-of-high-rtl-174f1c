// cell_dmux: the demultiplexer (DMUX) that distributes the stream of cells
// read from the shared buffer to the output ports.
//
// When in_valid is high, the output port number in_port is decoded into a
// one-hot load strobe for that port's parallel-to-serial converter, and the
// cell is presented to all of them on out_cell. Port numbers outside
// 0..N_PORTS-1 load nothing. The block is combinational so that the chosen
// P/S is busy from the clock after the controller's read; this is this
// design's choice.
module cell_dmux
  import atm_pkg::*;
#(
  parameter int N_PORTS = 8,
  localparam int PW     = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic               in_valid,
  input  logic [PW-1:0]      in_port,
  input  atm_cell_t          in_cell,
  output logic [N_PORTS-1:0] load,
  output atm_cell_t          out_cell
);

  always_comb begin
    for (int p = 0; p < N_PORTS; p++)
      load[p] = in_valid && (32'(in_port) == p);
    out_cell = in_cell;
  end

endmodule
