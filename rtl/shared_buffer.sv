// shared_buffer: the switch's shared cell memory with one FIFO queue per
// output port.
//
// DEPTH cell locations are shared by all outputs. Each output's queue is a
// linked list through the `next` array (head, tail and length per output);
// unused locations sit on a free stack, and locations never used yet are
// handed out in order by a counter, so no initialisation pass is needed after
// reset. A write (wr_en) appends wr_data to queue wr_port; a read (rd_en)
// removes the head of queue rd_port, whose data is on rd_data in the same
// clock (asynchronous read) so the caller can take it at the clock edge that
// performs the read. A write and a read may happen in the same clock, to
// different queues. `full` is the buffer_full signal: every location holds a
// cell. Writing when full or reading an empty queue is a protocol error and is
// checked by assertions. The document gives the buffer's purpose and its
// full condition; the linked-list organisation is this design's choice.
module shared_buffer #(
  parameter int N_PORTS = 8,
  parameter int DEPTH   = 100,
  parameter int DATA_W  = 456,
  localparam int PW     = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  localparam int AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int OW     = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [PW-1:0]     wr_port,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [PW-1:0]     rd_port,
  output logic [DATA_W-1:0] rd_data,
  output logic              full,
  output logic [OW-1:0]     occupancy,
  output logic [N_PORTS-1:0] q_nonempty
);

  logic [DATA_W-1:0] mem   [DEPTH];
  logic [AW-1:0]     next  [DEPTH];
  logic [AW-1:0]     fstack[DEPTH];
  logic [OW-1:0]     fsp;        // entries on the free stack
  logic [OW-1:0]     fresh;      // locations never used so far
  logic [AW-1:0]     head [N_PORTS];
  logic [AW-1:0]     tail [N_PORTS];
  logic [OW-1:0]     qlen [N_PORTS];

  logic [AW-1:0] wr_addr;
  logic [AW-1:0] rd_addr;
  logic          do_wr;
  logic          do_rd;
  logic          link_head;  // the written cell becomes its queue's head

  always_comb begin
    full    = (occupancy == OW'(DEPTH));
    do_wr   = wr_en && !full;
    do_rd   = rd_en && (qlen[rd_port] != '0);
    rd_addr = head[rd_port];
    rd_data = mem[rd_addr];
    if (fsp != '0) wr_addr = fstack[fsp - OW'(1)];
    else           wr_addr = AW'(DEPTH - 32'(fresh));
    link_head = (qlen[wr_port] == '0) ||
                (do_rd && rd_port == wr_port && qlen[wr_port] == OW'(1));
    for (int p = 0; p < N_PORTS; p++) q_nonempty[p] = (qlen[p] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsp       <= '0;
      fresh     <= OW'(DEPTH);
      occupancy <= '0;
      for (int p = 0; p < N_PORTS; p++) begin
        head[p] <= '0;
        tail[p] <= '0;
        qlen[p] <= '0;
      end
    end else begin
      occupancy <= occupancy + OW'(do_wr) - OW'(do_rd);
      // free-location bookkeeping (stack contents written below)
      if (do_wr && do_rd) begin
        // the read location replaces the one taken for the write
        if (fsp == '0) begin
          fsp   <= OW'(1);
          fresh <= fresh - OW'(1);
        end
      end else if (do_wr) begin
        if (fsp != '0) fsp <= fsp - OW'(1);
        else           fresh <= fresh - OW'(1);
      end else if (do_rd) begin
        fsp <= fsp + OW'(1);
      end
      // queue bookkeeping
      if (do_rd) begin
        head[rd_port] <= next[rd_addr];
        qlen[rd_port] <= qlen[rd_port] - OW'(1);
      end
      if (do_wr) begin
        tail[wr_port] <= wr_addr;
        if (link_head) head[wr_port] <= wr_addr;
        qlen[wr_port] <= qlen[wr_port] + OW'(1) - OW'(do_rd && rd_port == wr_port);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) begin
      mem[wr_addr] <= wr_data;
      if (!link_head) next[tail[wr_port]] <= wr_addr;
    end
    if (do_rd) begin
      if (do_wr && fsp != '0) fstack[fsp - OW'(1)] <= rd_addr;
      else                    fstack[fsp]          <= rd_addr;
    end
  end

  // Protocol rules of the buffer.
  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("shared_buffer: write while buffer_full");
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> q_nonempty[rd_port])
    else $error("shared_buffer: read of an empty queue");

endmodule
