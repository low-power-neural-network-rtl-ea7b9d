// gauss_solver: solves the normal equations of one neuron for one subset of
// its six terms, giving the coefficients b0..b5 of that candidate equation.
//
// A term is kept when its bit of term_mask is 1. Removing a term removes its
// row and column from G and its row from r, and its coefficient is 0. Here
// the removed row and column are replaced by a row and column of the identity
// (G[k][k] = 1, r[k] = 0), which forces b_k = 0 and leaves the kept terms'
// system unchanged, so one 6x6 solver serves every subset.
//
// The system is solved by Gauss-Jordan elimination in fixed point (W bits,
// F fractional bits, the format of the accumulated sums). For each column k:
// the row with the largest |M[i][k]| among rows k..5 is swapped into place
// (partial pivoting); if that pivot is at most EPS the matrix has no inverse,
// the candidate is reported singular and no coefficients are produced; else
// row k is divided by the pivot, one element at a time on a shared
// seq_divider, and k's column is cleared from every other row, one row per
// clock. The right-hand column then holds the coefficients, which are rounded
// to the neuron's data format and saturated.
//
// Interface: pulse start with g, r and term_mask stable in that cycle; done
// pulses when the result is ready, with singular and coef valid until the
// next start. Latency is data dependent: about 6 * (k_nz * (W + F + 2) + 7)
// clocks, where k_nz is the number of non-zero elements divided.
// The method (matrix inversion of the reduced system, giving up when there is
// no inverse) follows the training algorithm; pivoting, fixed-point format,
// EPS and the serial divider are this design's choices.
module gauss_solver
  import gmdh_pkg::*;
#(
  parameter int unsigned W   = 64,         // width of matrix elements
  parameter int unsigned F   = 2 * FRAC,   // fractional bits of g and r
  parameter longint      EPS = 16          // largest pivot treated as zero (in LSBs)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [W-1:0]     g [N_TERMS][N_TERMS],
  input  logic signed [W-1:0]     r [N_TERMS],
  input  logic [N_TERMS-1:0]      term_mask,
  output logic                    done,
  output logic                    singular,
  output logic [N_TERMS-1:0][DATA_W-1:0] coef
);
  localparam int unsigned NC = N_TERMS + 1;  // columns incl. right-hand side
  localparam int unsigned DW = W + F;
  localparam logic signed [W-1:0] ONE = W'(longint'(1) << F);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};

  typedef enum logic [2:0] {S_IDLE, S_PIVOT, S_NORM, S_NWAIT, S_ELIM, S_OUT} state_t;
  state_t state;

  logic signed [W-1:0] m [N_TERMS][NC];
  logic signed [W-1:0] piv;
  logic [2:0]          k, j, i;

  // pivot search over rows k..5 of column k
  logic [2:0]   best_row;
  logic [W-1:0] best_abs;
  always_comb begin
    best_row = k;
    best_abs = m[k][k][W-1] ? W'(-m[k][k]) : W'(m[k][k]);
    for (int rr = 0; rr < N_TERMS; rr++) begin
      logic [W-1:0] a;
      a = m[rr][k][W-1] ? W'(-m[rr][k]) : W'(m[rr][k]);
      if (rr > int'(k) && a > best_abs) begin
        best_abs = a;
        best_row = 3'(rr);
      end
    end
  end

  // divider for row normalisation
  logic          div_start, div_busy, div_done;
  logic [DW-1:0] div_q;
  logic [W-1:0]  div_rem;
  logic [W-1:0]  num_abs, piv_abs;
  logic          num_neg;

  always_comb begin
    num_neg = m[k][j][W-1] ^ piv[W-1];
    num_abs = m[k][j][W-1] ? W'(-m[k][j]) : W'(m[k][j]);
    piv_abs = piv[W-1] ? W'(-piv) : W'(piv);
  end

  seq_divider #(.DW(DW), .VW(W)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend ({num_abs, F'(0)}),
    .divisor  (piv_abs),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_rem)
  );

  // quotient, saturated to W bits, with its sign
  logic signed [W-1:0] quot;
  always_comb begin
    logic [W-1:0] qm;
    qm   = (div_q > DW'(MAXV)) ? MAXV : div_q[W-1:0];
    quot = num_neg ? -$signed(qm) : $signed(qm);
  end

  // coefficient rounding from F to FRAC fractional bits, with saturation
  function automatic logic [DATA_W-1:0] to_coef(input logic signed [W-1:0] v);
    logic signed [W-1:0] s;
    s = (v + W'(longint'(1) << (F - FRAC - 1))) >>> (F - FRAC);
    if (s > W'(longint'(2) ** (DATA_W - 1) - 1)) return {1'b0, {(DATA_W-1){1'b1}}};
    if (s < -W'(longint'(2) ** (DATA_W - 1)))    return {1'b1, {(DATA_W-1){1'b0}}};
    return s[DATA_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      singular  <= 1'b0;
      coef      <= '0;
      piv       <= '0;
      k         <= '0;
      j         <= '0;
      i         <= '0;
      div_start <= 1'b0;
      for (int a = 0; a < N_TERMS; a++)
        for (int b = 0; b < NC; b++) m[a][b] <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          for (int a = 0; a < N_TERMS; a++) begin
            for (int b = 0; b < N_TERMS; b++) begin
              if (term_mask[a] && term_mask[b]) m[a][b] <= g[a][b];
              else                              m[a][b] <= (a == b) ? ONE : '0;
            end
            m[a][N_TERMS] <= term_mask[a] ? r[a] : '0;
          end
          k     <= '0;
          state <= S_PIVOT;
        end
        S_PIVOT: begin
          if (best_abs <= W'(EPS)) begin
            singular <= 1'b1;
            done     <= 1'b1;
            state    <= S_IDLE;
          end else begin
            for (int b = 0; b < NC; b++) begin
              m[k][b]        <= m[best_row][b];
              m[best_row][b] <= m[k][b];
            end
            piv   <= m[best_row][k];
            j     <= k;
            state <= S_NORM;
          end
        end
        S_NORM: begin
          if (m[k][j] == '0) begin
            if (j == 3'(NC - 1)) begin
              i     <= '0;
              state <= S_ELIM;
            end else j <= j + 1'b1;
          end else begin
            div_start <= 1'b1;
            state     <= S_NWAIT;
          end
        end
        S_NWAIT: if (div_done) begin
          m[k][j] <= quot;
          if (j == 3'(NC - 1)) begin
            i     <= '0;
            state <= S_ELIM;
          end else begin
            j     <= j + 1'b1;
            state <= S_NORM;
          end
        end
        S_ELIM: begin
          if (i != k) begin
            for (int b = 0; b < NC; b++) begin
              logic signed [2*W-1:0] p;
              p = (2*W)'(m[i][k]) * (2*W)'(m[k][b]);
              m[i][b] <= m[i][b] - W'(p >>> F);
            end
          end
          if (i == 3'(N_TERMS - 1)) begin
            if (k == 3'(N_TERMS - 1)) state <= S_OUT;
            else begin
              k     <= k + 1'b1;
              state <= S_PIVOT;
            end
          end else i <= i + 1'b1;
        end
        S_OUT: begin
          for (int a = 0; a < N_TERMS; a++) coef[a] <= to_coef(m[a][N_TERMS]);
          singular <= 1'b0;
          done     <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
