// fpmac: single-precision floating-point multiply-accumulator.
//
// Each cycle the unit can take one pair (a, b) and add a*b to a running sum,
// so it sustains two floating-point operations per cycle. Following the
// design description, the expensive parts are kept out of the one-cycle
// accumulate loop:
//   * the sum is held in base 32: a wide two's-complement significand `acc`
//     and a block exponent `bexp`, value = acc * 2^(32*bexp - 300). The
//     product is pre-shifted by the low five bits of its exponent before it
//     reaches the loop, so inside the loop only shifts by whole multiples of
//     32 bits occur (constant shifters, a small mux);
//   * normalisation (leading-one detection, shift, packing) happens after the
//     loop, in its own pipeline stages.
// The description says the multiplier output stays in carry-save form and is
// merged by 4-2 compressors; here the product is written as a plain `*` and
// left to synthesis. IEEE special values are this design's simplification:
// denormal inputs are read as zero, results are truncated (rounded toward
// zero), overflow gives infinity and underflow zero; inf/NaN inputs are not
// handled.
//
// Interface: `issue` with a, b, `clr` (start a new sum with a*b) and `wb`
// (report this sum). `sleep` models the sleep region of the unit: while it is
// high the pipeline is idle and its state is lost, so a sum must restart with
// `clr` after a wake.
// Timing: `res_valid`/`res` carry the sum that includes the issued product
// exactly 8 clock edges after the issue edge; a register file written on the
// next edge gives the 9-cycle FPU latency of the instruction table.
module fpmac #(
  parameter int unsigned ACCW = 128     // accumulator width, 4 base-32 digits
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sleep,
  input  logic        issue,
  input  logic        clr,
  input  logic        wb,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        res_valid,
  output logic [31:0] res
);

  // ---------------- stage 1: operand capture ----------------
  logic        s1_v, s1_clr, s1_wb, s1_sign, s1_zero;
  logic [7:0]  s1_ea, s1_eb;
  logic [23:0] s1_ma, s1_mb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_clr <= 1'b0; s1_wb <= 1'b0; s1_sign <= 1'b0; s1_zero <= 1'b1;
      s1_ea <= '0; s1_eb <= '0; s1_ma <= '0; s1_mb <= '0;
    end else begin
      s1_v    <= issue && !sleep;
      s1_clr  <= clr;
      s1_wb   <= wb;
      s1_sign <= a[31] ^ b[31];
      s1_zero <= (a[30:23] == 8'd0) || (b[30:23] == 8'd0);
      s1_ea   <= a[30:23];
      s1_eb   <= b[30:23];
      s1_ma   <= {1'b1, a[22:0]};
      s1_mb   <= {1'b1, b[22:0]};
    end
  end

  // ---------------- stage 2: significand product ----------------
  logic        s2_v, s2_clr, s2_wb, s2_sign, s2_zero;
  logic [8:0]  s2_x;          // ea + eb
  logic [47:0] s2_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_clr <= 1'b0; s2_wb <= 1'b0; s2_sign <= 1'b0; s2_zero <= 1'b1;
      s2_x <= '0; s2_p <= '0;
    end else begin
      s2_v    <= s1_v && !sleep;
      s2_clr  <= s1_clr;
      s2_wb   <= s1_wb;
      s2_sign <= s1_sign;
      s2_zero <= s1_zero;
      s2_x    <= 9'(s1_ea) + 9'(s1_eb);
      s2_p    <= s1_ma * s1_mb;
    end
  end

  // ---------------- stage 3: base-32 alignment ----------------
  // value = p * 2^(x - 300) = (p << x[4:0]) * 2^(32*x[8:5] - 300)
  logic                   s3_v, s3_clr, s3_wb, s3_zero;
  logic signed [7:0]      s3_b;
  logic signed [ACCW-1:0] s3_val;
  logic [ACCW-1:0]        aligned;

  assign aligned = ACCW'(s2_p) << s2_x[4:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v <= 1'b0; s3_clr <= 1'b0; s3_wb <= 1'b0; s3_zero <= 1'b1;
      s3_b <= '0; s3_val <= '0;
    end else begin
      s3_v    <= s2_v && !sleep;
      s3_clr  <= s2_clr;
      s3_wb   <= s2_wb;
      s3_zero <= s2_zero;
      s3_b    <= 8'(s2_x[8:5]);
      s3_val  <= s2_zero ? '0 : (s2_sign ? -$signed(aligned) : $signed(aligned));
    end
  end

  // ---------------- stage 4: single-cycle accumulate loop ----------------
  logic signed [ACCW-1:0] acc;
  logic signed [7:0]      bexp;
  logic                   s4_v, s4_wb;

  // Arithmetic right shift by whole base-32 digits: 0, 32, 64, 96 or all.
  function automatic logic signed [ACCW-1:0] shr32(input logic signed [ACCW-1:0] v,
                                                   input logic [7:0] digits);
    unique case (digits)
      8'd0:    shr32 = v;
      8'd1:    shr32 = v >>> 32;
      8'd2:    shr32 = v >>> 64;
      8'd3:    shr32 = v >>> 96;
      default: shr32 = v >>> (ACCW - 1);
    endcase
  endfunction

  logic signed [ACCW-1:0] sum, sum_n;
  logic signed [7:0]      bsum, bsum_n;
  logic signed [7:0]      d;
  logic                   too_big, too_small;

  always_comb begin
    d = s3_b - bexp;
    if (s3_zero) begin
      sum  = acc;
      bsum = bexp;
    end else if (d > 0) begin
      sum  = shr32(acc, 8'(d)) + s3_val;
      bsum = s3_b;
    end else begin
      sum  = acc + shr32(s3_val, 8'(-d));
      bsum = bexp;
    end
    // Keep the magnitude between 2^63 and 2^95: one digit step per cycle.
    too_big   = !((&sum[ACCW-1:95]) || !(|sum[ACCW-1:95]));
    too_small = ((&sum[ACCW-1:63]) || !(|sum[ACCW-1:63])) && (sum != '0);
    if (too_big) begin
      sum_n  = sum >>> 32;
      bsum_n = bsum + 8'sd1;
    end else if (too_small) begin
      sum_n  = sum <<< 32;
      bsum_n = bsum - 8'sd1;
    end else begin
      sum_n  = sum;
      bsum_n = bsum;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; bexp <= '0; s4_v <= 1'b0; s4_wb <= 1'b0;
    end else if (sleep) begin
      acc <= '0; bexp <= '0; s4_v <= 1'b0; s4_wb <= 1'b0;
    end else begin
      s4_v  <= s3_v;
      s4_wb <= s3_wb;
      if (s3_v) begin
        if (s3_clr) begin
          acc  <= s3_val;
          bexp <= s3_zero ? 8'sd0 : s3_b;
        end else begin
          acc  <= sum_n;
          bexp <= bsum_n;
        end
      end
    end
  end

  // ---------------- stages 5-8: normalisation outside the loop ----------------
  logic                  s5_v, s5_sign;
  logic [ACCW-1:0]       s5_mag;
  logic signed [7:0]     s5_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s5_v <= 1'b0; s5_sign <= 1'b0; s5_mag <= '0; s5_b <= '0;
    end else begin
      s5_v    <= s4_v && s4_wb && !sleep;
      s5_sign <= acc[ACCW-1];
      s5_mag  <= acc[ACCW-1] ? -acc : acc;
      s5_b    <= bexp;
    end
  end

  // Leading-one position of the magnitude.
  logic [7:0] lead;
  logic       mag_zero;
  always_comb begin
    lead     = '0;
    mag_zero = (s5_mag == '0);
    for (int i = 0; i < int'(ACCW); i++)
      if (s5_mag[i]) lead = 8'(i);
  end

  logic                  s6_v, s6_sign, s6_zero;
  logic [ACCW-1:0]       s6_mag;
  logic [7:0]            s6_lead;
  logic signed [11:0]    s6_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s6_v <= 1'b0; s6_sign <= 1'b0; s6_zero <= 1'b1; s6_mag <= '0; s6_lead <= '0; s6_exp <= '0;
    end else begin
      s6_v    <= s5_v && !sleep;
      s6_sign <= s5_sign;
      s6_zero <= mag_zero;
      s6_mag  <= s5_mag;
      s6_lead <= lead;
      // biased exponent = lead + 32*bexp - 300 + 127
      s6_exp  <= 12'(signed'({4'd0, lead})) + (12'(s5_b) <<< 5) - 12'sd173;
    end
  end

  logic                  s7_v, s7_sign, s7_zero;
  logic [ACCW-1:0]       s7_norm;
  logic signed [11:0]    s7_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s7_v <= 1'b0; s7_sign <= 1'b0; s7_zero <= 1'b1; s7_norm <= '0; s7_exp <= '0;
    end else begin
      s7_v    <= s6_v && !sleep;
      s7_sign <= s6_sign;
      s7_zero <= s6_zero;
      s7_norm <= s6_mag << (8'(ACCW - 1) - s6_lead);
      s7_exp  <= s6_exp;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= s7_v && !sleep;
      if (s7_zero || s7_exp <= 0)
        res <= {s7_sign & !s7_zero, 31'd0};
      else if (s7_exp >= 255)
        res <= {s7_sign, 8'hff, 23'd0};
      else
        res <= {s7_sign, s7_exp[7:0], s7_norm[ACCW-2 -: 23]};
    end
  end

endmodule
