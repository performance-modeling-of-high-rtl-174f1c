// switch_ctrl: the switch controller, a finite state machine that carries out
// the protocol layer one cell at a time.
//
//   idle          waits for cell_arrived from any input; with none waiting but
//                 a queued cell whose output is free, goes to transmit_cell.
//   receive_cell  takes the cell of the chosen input (round robin): the
//                 input's header converter captures it and the S/P is
//                 released (cnv_load, one-hot).
//   process_cell  the routed cell (output port) and its translated header
//                 are latched into the MUX register (mux_load, mux_sel).
//   switch_cell   stores the cell in the shared buffer (write) unless the
//                 header was bad (drop_header) or the buffer is full
//                 (drop_full: the cell is lost).
//   transmit_cell reads the head cell of one output queue whose P/S is ready
//                 (read, rd_port; round robin) and returns to idle.
//
// Each state lasts one clock, so an arriving cell needs five clocks; with
// 424-clock slots eight inputs and eight outputs are served well within a
// slot, which gives the output buffer the eightfold speed the model assumes.
// The state names and their order follow the document; the transition from
// idle straight to transmit_cell, the round-robin choices and the one-clock
// states are this design's choices.
module switch_ctrl
  import atm_pkg::*;
#(
  parameter int N_PORTS = 8,
  localparam int PW     = (N_PORTS > 1) ? $clog2(N_PORTS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_PORTS-1:0] cell_arrived,
  input  logic               conv_valid,
  input  cnv_status_e        conv_status,
  input  logic [7:0]         conv_port,
  input  logic               buffer_full,
  input  logic [N_PORTS-1:0] q_nonempty,
  input  logic [N_PORTS-1:0] tx_ready,
  output logic [N_PORTS-1:0] cnv_load,
  output logic [PW-1:0]      mux_sel,
  output logic               mux_load,
  output logic               write,
  output logic [PW-1:0]      wr_port,
  output logic               read,
  output logic [PW-1:0]      rd_port,
  output logic               drop_full,
  output logic               drop_header,
  output ctrl_state_e        state
);

  ctrl_state_e   state_nxt;
  logic [PW-1:0] in_sel;     // input being served
  logic [PW-1:0] in_ptr;     // round-robin pointer over inputs
  logic [PW-1:0] out_ptr;    // round-robin pointer over outputs
  logic [N_PORTS-1:0] tx_req;
  logic [PW-1:0] in_pick;
  logic [PW-1:0] out_pick;

  // First requester at or after ptr, cyclically.
  function automatic logic [PW-1:0] rr_pick(input logic [N_PORTS-1:0] req,
                                            input logic [PW-1:0] ptr);
    logic [PW-1:0] r;
    int            idx;
    r = ptr;
    for (int i = N_PORTS - 1; i >= 0; i--) begin
      idx = (32'(ptr) + i) % N_PORTS;
      if (req[idx]) r = PW'(idx);
    end
    return r;
  endfunction

  function automatic logic [PW-1:0] rr_next(input logic [PW-1:0] i);
    return (32'(i) == N_PORTS - 1) ? '0 : i + PW'(1);
  endfunction

  always_comb begin
    tx_req      = q_nonempty & tx_ready;
    in_pick     = rr_pick(cell_arrived, in_ptr);
    out_pick    = rr_pick(tx_req, out_ptr);
    cnv_load    = '0;
    mux_sel     = in_sel;
    mux_load    = 1'b0;
    write       = 1'b0;
    wr_port     = PW'(conv_port);
    read        = 1'b0;
    rd_port     = out_pick;
    drop_full   = 1'b0;
    drop_header = 1'b0;
    state_nxt   = state;
    unique case (state)
      ST_IDLE: begin
        if (|cell_arrived)  state_nxt = ST_RECEIVE_CELL;
        else if (|tx_req)   state_nxt = ST_TRANSMIT_CELL;
      end
      ST_RECEIVE_CELL: begin
        cnv_load[in_sel] = 1'b1;
        state_nxt        = ST_PROCESS_CELL;
      end
      ST_PROCESS_CELL: begin
        mux_load  = 1'b1;
        state_nxt = ST_SWITCH_CELL;
      end
      ST_SWITCH_CELL: begin
        if (conv_status != CNV_OK) drop_header = 1'b1;
        else if (buffer_full)      drop_full   = 1'b1;
        else                       write       = 1'b1;
        state_nxt = ST_TRANSMIT_CELL;
      end
      ST_TRANSMIT_CELL: begin
        read      = |tx_req;
        state_nxt = ST_IDLE;
      end
      default: state_nxt = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      in_sel  <= '0;
      in_ptr  <= '0;
      out_ptr <= '0;
    end else begin
      state <= state_nxt;
      if (state == ST_IDLE && |cell_arrived) begin
        in_sel <= in_pick;
        in_ptr <= rr_next(in_pick);
      end
      if (read) out_ptr <= rr_next(out_pick);
    end
  end

  a_switch_has_cell: assert property (@(posedge clk) disable iff (!rst_n)
      state == ST_SWITCH_CELL |-> conv_valid)
    else $error("switch_ctrl: switch_cell without a cell from the MUX");
  a_receive_has_cell: assert property (@(posedge clk) disable iff (!rst_n)
      state == ST_RECEIVE_CELL |-> cell_arrived[in_sel])
    else $error("switch_ctrl: receive_cell without cell_arrived");

endmodule
