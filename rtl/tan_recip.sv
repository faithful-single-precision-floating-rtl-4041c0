// tan_recip: pipelined reciprocal of a normalized 36-bit mantissa, r = 1/m for
// m in [1, 2).
//
// The published architecture uses a separate inverse unit and does not
// describe its insides; this version is a plain restoring digit recurrence that
// yields one quotient bit per step, spread over STAGES register stages
// (ceil(36 / STAGES) bits per stage). It returns q = floor(2^71 / d_mant), which
// for d_mant in (2^35, 2^36) lies in [2^35, 2^36): the reciprocal is q / 2^36.
// For m = 1 exactly the true quotient 2^36 does not fit and the recurrence
// saturates to 2^36 - 1 (error 2^-36). Truncation error is below one unit of
// the 36-bit result, well under the 2^-26 relative budget of the divider.
// Timing: fully pipelined, one new operand per cycle, q appears STAGES cycles
// after d_mant. The stage registers have no reset; validity is tracked by the
// caller.
module tan_recip
  import tan_pkg::*;
#(
  parameter int unsigned STAGES = 12
) (
  input  logic              clk,
  input  logic [MANT_W-1:0] d_mant,  // 1.35, d_mant[35] = 1
  output logic [MANT_W-1:0] q        // floor(2^71 / d_mant), saturated
);
  localparam int BPS = (MANT_W + STAGES - 1) / STAGES;   // quotient bits per stage

  // index s holds the state entering stage s; index 0 is the input
  logic [MANT_W:0]   rem_p [STAGES+1];
  logic [MANT_W-1:0] div_p [STAGES+1];
  logic [MANT_W-1:0] quo_p [STAGES+1];

  // bits 71..36 of the dividend 2^71 leave a partial remainder of 2^35
  assign rem_p[0] = (MANT_W+1)'(1) << (MANT_W - 1);
  assign div_p[0] = d_mant;
  assign quo_p[0] = '0;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [MANT_W:0]   rem_n;
    logic [MANT_W-1:0] quo_n;

    always_comb begin
      rem_n = rem_p[s];
      quo_n = quo_p[s];
      for (int j = 0; j < BPS; j++) begin
        if (s * BPS + j < MANT_W) begin
          rem_n = rem_n << 1;
          if (rem_n >= {1'b0, div_p[s]}) begin
            rem_n = rem_n - {1'b0, div_p[s]};
            quo_n[MANT_W - 1 - (s * BPS + j)] = 1'b1;
          end
        end
      end
    end

    always_ff @(posedge clk) begin
      rem_p[s+1] <= rem_n;
      div_p[s+1] <= div_p[s];
      quo_p[s+1] <= quo_n;
    end
  end

  assign q = quo_p[STAGES];
endmodule
