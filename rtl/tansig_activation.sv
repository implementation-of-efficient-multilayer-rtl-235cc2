// tansig_activation: tan-sigmoid (tanh) activation of the neuron, evaluated
// from truncated Taylor series of the two exponentials.
//
// How it works. The argument x is clamped to +/-X_MAX and converted to a
// fixed-point value with X_FRAC fractional bits. Two series are then summed,
// one term per clock, for n = 1..K:
//     y = sum_{n=0..K} x^n / n!          (truncated series of e^x)
//     z = sum_{n=0..K} (-1)^n x^n / n!   (truncated series of e^-x)
// Both share one term t_n = t_{n-1} * x / n, so each cycle does one multiply
// by x and one multiply by the constant 1/n (a table of K reciprocals with
// RECIP_FRAC fractional bits, computed at elaboration); y adds t_n and z adds
// or subtracts it by the parity of n. The activation is then the ratio
//     f = (y - z) / (y + z)
// formed by a restoring divider that yields one quotient bit per clock: an
// integer bit and OUT_FRAC fractional bits. The series form, the order K and
// the ratio follow the document's tan-sigmoid analysis; the one-term-per-clock
// recurrence, the fixed-point formats, the clamp and the divider are this
// design's own choices. With K = 40 the result tracks tanh(x) over the whole
// clamped range; with smaller K it follows the truncated series, which is what
// lets the order be compared.
//
// Interface. `start` (one cycle, while `busy` is low) samples `x_in`, a
// signed fixed-point number with IN_FRAC fractional bits. `done` pulses for
// one cycle with the result on `y_out` (signed, OUT_FRAC fractional bits),
// which holds until the next result. `sat` flags a ratio whose magnitude is
// 2.0 or more (or a zero denominator), reported as +/-(2 - 2^-OUT_FRAC);
// `clamped` flags an argument that was limited to +/-X_MAX. A start while busy
// is ignored.
//
// Timing. done rises LATENCY = K + OUT_FRAC + 2 clocks after the edge that
// sampled start: 1 load, K series terms, 1 divider set-up, OUT_FRAC+1 bits.
module tansig_activation #(
  parameter int unsigned IN_W       = 2 * neuron_pkg::DATA_W,
  parameter int unsigned IN_FRAC    = 0,
  parameter int unsigned K          = neuron_pkg::TAYLOR_K,
  parameter int unsigned X_MAX      = neuron_pkg::X_MAX,
  parameter int unsigned X_FRAC     = neuron_pkg::X_FRAC,
  parameter int unsigned AW         = neuron_pkg::ACC_W,
  parameter int unsigned AFRAC      = neuron_pkg::ACC_FRAC,
  parameter int unsigned RB         = neuron_pkg::RECIP_FRAC,
  parameter int unsigned OUT_W      = neuron_pkg::ACT_W,
  parameter int unsigned OUT_FRAC   = neuron_pkg::ACT_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    busy,
  output logic                    done,
  output logic signed [OUT_W-1:0] y_out,
  output logic                    sat,
  output logic                    clamped
);

  localparam int unsigned XW = $clog2(X_MAX + 1) + X_FRAC + 2;  // argument width
  localparam int unsigned QB = OUT_FRAC + 1;                     // quotient bits
  localparam int unsigned NW = $clog2(K + 1);                    // term counter (K >= 1)
  localparam int unsigned BW = $clog2(QB + 1) + 1;               // bit counter
  localparam int unsigned DW = AW + 2;                           // divider width

  typedef enum logic [1:0] {S_IDLE, S_SERIES, S_SETUP, S_DIV} state_t;
  state_t state;

  // ---------------------------------------------------------------- 1/n table
  logic [RB:0] recip_tab [K+1];
  assign recip_tab[0] = '0;
  for (genvar g = 1; g <= int'(K); g++) begin : g_recip
    localparam longint unsigned RV = ((64'd1 << RB) + 64'(g / 2)) / 64'(g);
    assign recip_tab[g] = (RB+1)'(RV);
  end

  // ------------------------------------------------------------- input clamp
  logic signed [IN_W+1:0]        lim;
  logic signed [IN_W-1:0]        x_cl;
  logic signed [XW-1:0]          x_wide;
  logic                          x_over;
  always_comb begin
    lim    = (IN_W+2)'(X_MAX) <<< IN_FRAC;
    x_over = 1'b0;
    x_cl   = x_in;
    if ((IN_W+2)'(x_in) > lim) begin
      x_cl   = IN_W'(lim);
      x_over = 1'b1;
    end else if ((IN_W+2)'(x_in) < -lim) begin
      x_cl   = IN_W'(-lim);
      x_over = 1'b1;
    end
    x_wide = XW'(((IN_W+X_FRAC)'(x_cl) <<< X_FRAC) >>> IN_FRAC);
  end

  // ------------------------------------------------------------ series step
  logic signed [XW-1:0]       x_q;
  logic signed [AW-1:0]       term, ysum, zsum;
  logic        [NW-1:0]       n;
  logic signed [AW+XW-1:0]    prod_x;
  logic signed [AW+RB+1:0]    prod_r;
  logic signed [AW-1:0]       t_x, t_next;
  always_comb begin
    prod_x = (AW+XW)'(term) * (AW+XW)'(x_q);
    t_x    = AW'(prod_x >>> X_FRAC);
    prod_r = (AW+RB+2)'(t_x) * (AW+RB+2)'($signed({1'b0, recip_tab[n]}));
    t_next = AW'(prod_r >>> RB);
  end

  // --------------------------------------------------------------- divider
  logic signed [AW:0]  num, den;
  logic        [DW-1:0] num_mag, den_mag, rem, rem_sh;
  logic        [QB-2:0] quo;      // quotient bits so far (OUT_FRAC >= 1)
  logic        [BW-1:0] bitn;
  logic                 neg, sat_r, q_bit;
  always_comb begin
    num     = (AW+1)'(ysum) - (AW+1)'(zsum);
    den     = (AW+1)'(ysum) + (AW+1)'(zsum);
    num_mag = num[AW] ? DW'(-num) : DW'(num);
    den_mag = den[AW] ? DW'(-den) : DW'(den);
    rem_sh  = (bitn == '0) ? rem : (rem << 1);
    q_bit   = (rem_sh >= den_mag);
  end

  localparam logic [QB-1:0] Q_MAX = '1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      y_out   <= '0;
      sat     <= 1'b0;
      clamped <= 1'b0;
      x_q     <= '0;
      term    <= '0;
      ysum    <= '0;
      zsum    <= '0;
      n       <= '0;
      rem     <= '0;
      quo     <= '0;
      bitn    <= '0;
      neg     <= 1'b0;
      sat_r   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x_q     <= x_wide;
          clamped <= x_over;
          term    <= AW'(64'd1 << AFRAC);   // n = 0 term: 1.0
          ysum    <= AW'(64'd1 << AFRAC);
          zsum    <= AW'(64'd1 << AFRAC);
          n       <= NW'(1);
          state   <= S_SERIES;
        end
        S_SERIES: begin
          term <= t_next;
          ysum <= ysum + t_next;
          zsum <= n[0] ? zsum - t_next : zsum + t_next;
          if (n == NW'(K)) state <= S_SETUP;
          n <= n + 1'b1;
        end
        S_SETUP: begin
          neg   <= num[AW] ^ den[AW];
          sat_r <= (den_mag == '0) || (num_mag >= (den_mag << 1));
          rem   <= (num_mag >= (den_mag << 1)) ? '0 : num_mag;
          quo   <= '0;
          bitn  <= '0;
          state <= S_DIV;
        end
        S_DIV: begin
          rem  <= q_bit ? rem_sh - den_mag : rem_sh;
          quo  <= (QB-1)'({quo, q_bit});
          bitn <= bitn + 1'b1;
          if (bitn == BW'(QB - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
            sat   <= sat_r;
            if (sat_r)
              y_out <= neg ? -OUT_W'(Q_MAX) : OUT_W'(Q_MAX);
            else
              y_out <= neg ? -OUT_W'({quo, q_bit}) : OUT_W'({quo, q_bit});
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
