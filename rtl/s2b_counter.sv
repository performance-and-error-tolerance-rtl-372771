// s2b_counter: stochastic-to-binary converter.
//
// Counts the ones of a bipolar stochastic stream over one period of 2^K
// cycles and turns the count into a W-bit two's complement value with W-1
// fraction bits. The bipolar value of the stream is
// v = (count - 2^(K-1)) / 2^(K-1). Because a scaled (mux) adder divides its
// result by the sum of the coefficient magnitudes, the count is multiplied
// by the constant GAIN_Q / 2^GF to undo that scaling (rounded, then
// saturated to the W-bit range). The counter itself follows the source
// design; the gain stage is this design's choice so that filters output
// y[n] in the same number format as x[n].
//
// Interface: clr starts a new period (count := 0); each cycle with en adds
// bit s. On the cycle with last = 1 (the final bit of the period, en also
// high) y is loaded with the converted value including that bit, and
// y_valid pulses on the following cycle with y stable until the next one.
module s2b_counter #(
  parameter int unsigned K       = 10,
  parameter int unsigned W       = 10,
  parameter int unsigned GF      = 8,
  parameter int unsigned GAIN_Q  = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic                last,
  input  logic                s,
  output logic signed [W-1:0] y,
  output logic                y_valid
);
  localparam int PW = K + 2 + 32;

  logic [K:0]          count;
  logic [K:0]          count_n;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] scaled;

  if (K < W) begin : g_bad
    $error("s2b_counter: K must be at least W");
  end

  assign count_n = count + {{K{1'b0}}, s};

  always_comb begin
    prod   = (PW'(signed'({1'b0, count_n})) - PW'(1 << (K - 1))) * PW'(GAIN_Q);
    scaled = (prod + (PW'(1) <<< (GF + K - W - 1))) >>> (GF + K - W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (clr) begin
        count <= '0;
      end else if (en) begin
        count <= count_n;
        if (last) begin
          y_valid <= 1'b1;
          if (scaled > PW'((1 << (W - 1)) - 1))
            y <= W'((1 << (W - 1)) - 1);
          else if (scaled < -PW'(1 << (W - 1)))
            y <= W'(-(1 << (W - 1)));
          else
            y <= W'(scaled);
        end
      end
    end
  end
endmodule
