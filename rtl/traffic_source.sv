// traffic_source: bursty cell source for one switch input (the traffic
// module of the performance model).
//
// The source alternates between active and silent periods measured in slots.
// The length of each period follows a mixture of two geometric
// distributions, p(n) = a(1-p1)p1^(n-1) + (1-a)(1-p2)p2^(n-1), n >= 1:
// when a period starts, branch 1 is chosen with probability a (alpha),
// and after each slot the period goes on with probability p1 or p2 of the
// chosen branch. Active and silent periods have their own a, p1, p2. A slot
// counter runs modulo k(A) through all periods, and a cell is sent in every
// active slot where it is zero: cells in an active period are exactly k(A)
// slots apart, and one source offers m(A)/(m(A)+m(S))/k(A) cells per slot,
// m being the mean period length. Computing a, p1, p2 from a mean m
// and a squared coefficient of variation c^2 is left to software:
//   a  = 0.5 (1 + sqrt(((c^2-1)m + 1) / ((c^2+1)m + 1)))
//   p1 = (m - 2a)/m,   p2 = (m - 2(1-a))/m
// Probabilities are Q0.16 fractions compared with 16-bit slices of a 64-bit
// xorshift generator seeded by SEED.
//
// Timing: decisions are made on slot_tick (one clock per slot of CELL_BITS
// clocks). On a tick the source first decides whether the previous slot's
// period goes on, then whether the new slot carries a cell; `active` and
// `cell_sent` describe the new slot from the next clock. A cell decided on a
// tick is sent on tx_* from the next clock for
// CELL_BITS clocks, MSB first, tx_soc on the first bit, so consecutive cells
// are back to back. Each cell carries cfg.vpi/cfg.vci with a valid HEC, and a
// payload of SRC_ID, a 32-bit sequence number and the sequence number's low
// byte repeated. The distribution and the constant spacing k(A) follow the
// document; the generator, the fixed-point format and the cell contents are
// this design's choices.
module traffic_source
  import atm_pkg::*;
#(
  parameter logic [63:0] SEED   = 64'h9E37_79B9_7F4A_7C15,
  parameter logic [7:0]  SRC_ID = 8'd0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  traffic_cfg_t cfg,
  input  logic         slot_tick,
  output logic         tx_soc,
  output logic         tx_valid,
  output logic         tx_data,
  output logic         active,
  output logic         cell_sent,
  output logic [31:0]  seq
);

  localparam int CW = $clog2(CELL_BITS);

  logic [63:0]          rng;
  logic [15:0]          p_cur;   // continuation probability of this period
  logic [7:0]           phase;   // slot count modulo k(A)
  logic [CELL_BITS-1:0] shreg;
  logic [CW-1:0]        cnt;
  logic                 emit;
  logic                 period_end;
  logic                 new_active;
  logic [15:0]          new_p;
  atm_cell_t            next_cell;

  function automatic logic [63:0] xorshift64(input logic [63:0] x);
    logic [63:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 7);
    y = y ^ (y << 17);
    return y;
  endfunction

  always_comb begin
    // the period of the previous slot ends with probability 1 - p_cur
    period_end = (rng[15:0] >= p_cur);
    new_active = period_end ? !active : active;
    if (!period_end) new_p = p_cur;
    else if (new_active) new_p = (rng[31:16] < cfg.alpha_a) ? cfg.p1_a : cfg.p2_a;
    else                 new_p = (rng[31:16] < cfg.alpha_s) ? cfg.p1_s : cfg.p2_s;
    emit = cfg.enable && new_active && (phase == 8'd0);
    next_cell.hdr     = hdr_with_hec('{gfc: 4'd0, vpi: cfg.vpi, vci: cfg.vci,
                                       pt: 3'd0, clp: 1'b0, hec: 8'd0});
    next_cell.payload = {SRC_ID, seq, {43{seq[7:0]}}};
  end

  assign tx_data = shreg[CELL_BITS-1];
  assign tx_soc  = tx_valid && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rng       <= (SEED == '0) ? 64'h1 : SEED;
      active    <= 1'b0;
      p_cur     <= '0;       // the first slot starts an active period
      phase     <= '0;
      tx_valid  <= 1'b0;
      cnt       <= '0;
      shreg     <= '0;
      cell_sent <= 1'b0;
      seq       <= '0;
    end else begin
      rng       <= xorshift64(rng);
      cell_sent <= 1'b0;
      if (tx_valid) begin
        shreg <= {shreg[CELL_BITS-2:0], 1'b0};
        cnt   <= cnt + CW'(1);
        if (cnt == CW'(CELL_BITS - 1)) begin
          tx_valid <= 1'b0;
          cnt      <= '0;
        end
      end
      if (slot_tick && cfg.enable) begin
        if (emit) begin
          shreg     <= next_cell;
          tx_valid  <= 1'b1;
          cnt       <= '0;
          cell_sent <= 1'b1;
          seq       <= seq + 32'd1;
        end
        active <= new_active;
        p_cur  <= new_p;
        phase <= (phase + 8'd1 >= cfg.k_a) ? 8'd0 : phase + 8'd1;
      end
    end
  end

endmodule
