// dct1d: 8-point one-dimensional DCT, even/odd decomposed.
//
// Computes Z_n = sum_m x_m * (k_n/2) cos((2m+1) n pi / 16) for n = 0..7 with
// the 8-bit cosine basis a..g (7 fractional bits), rounding the result to an
// integer. As in the paper the 8x8 product is split in two halves:
//   pre-processing stage (adders only):  s_i = x_i + x_(7-i),
//                                        d_i = x_i - x_(7-i),  i = 0..3
//   even 4x4 matrix:  Z0,Z2,Z4,Z6 from s_0..s_3 with basis d, b, f
//   odd  4x4 matrix:  Z1,Z3,Z5,Z7 from d_0..d_3 with basis a, c, e, g
// which halves the number of constant multiplications (32 instead of 64).
// Every constant multiplication is a shift-and-add through csd_precompute.
//
// Ports: in_valid/x (eight signed IN_W samples), out_valid/z (eight signed
// OUT_W coefficients, z[n] = Z_n). Timing: fully pipelined, one vector per
// clock, latency 2 (register after the pre-processing adders and after the
// matrix sums). Rounding is (sum + 64) >>> 7 and the result is truncated to
// OUT_W bits; the register placement and rounding are this design's choice.
module dct1d
  import imgproc_pkg::*;
#(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] z [8]
);
  localparam int unsigned BW = IN_W + 1;      // butterfly width
  localparam int unsigned PW = BW + 7;        // product width
  localparam int unsigned SW = PW + 3;        // sum width

  // Pre-processing unit: butterfly adders.
  logic signed [BW-1:0] s_q [4], d_q [4];
  logic                 v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        s_q[i] <= '0;
        d_q[i] <= '0;
      end
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < 4; i++) begin
          s_q[i] <= BW'(x[i]) + BW'(x[7-i]);
          d_q[i] <= BW'(x[i]) - BW'(x[7-i]);
        end
      end
    end
  end

  // Shared shift-add products of every butterfly output.
  logic signed [PW-1:0] ps [4][7];
  logic signed [PW-1:0] pd [4][7];

  for (genvar i = 0; i < 4; i++) begin : g_pre
    csd_precompute #(.IN_W(BW)) u_even (.x(s_q[i]), .prod(ps[i]));
    csd_precompute #(.IN_W(BW)) u_odd  (.x(d_q[i]), .prod(pd[i]));
  end

  // Even and odd 4x4 matrices.
  logic signed [SW-1:0] acc [8];

  always_comb begin
    acc[0] = SW'(ps[0][K_D]) + SW'(ps[1][K_D]) + SW'(ps[2][K_D]) + SW'(ps[3][K_D]);
    acc[2] = SW'(ps[0][K_B]) + SW'(ps[1][K_F]) - SW'(ps[2][K_F]) - SW'(ps[3][K_B]);
    acc[4] = SW'(ps[0][K_D]) - SW'(ps[1][K_D]) - SW'(ps[2][K_D]) + SW'(ps[3][K_D]);
    acc[6] = SW'(ps[0][K_F]) - SW'(ps[1][K_B]) + SW'(ps[2][K_B]) - SW'(ps[3][K_F]);
    acc[1] = SW'(pd[0][K_A]) + SW'(pd[1][K_C]) + SW'(pd[2][K_E]) + SW'(pd[3][K_G]);
    acc[3] = SW'(pd[0][K_C]) - SW'(pd[1][K_G]) - SW'(pd[2][K_A]) - SW'(pd[3][K_E]);
    acc[5] = SW'(pd[0][K_E]) - SW'(pd[1][K_A]) + SW'(pd[2][K_G]) + SW'(pd[3][K_C]);
    acc[7] = SW'(pd[0][K_G]) - SW'(pd[1][K_E]) + SW'(pd[2][K_C]) - SW'(pd[3][K_A]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int n = 0; n < 8; n++) z[n] <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        for (int n = 0; n < 8; n++) z[n] <= OUT_W'((acc[n] + SW'(64)) >>> COEF_FRAC);
      end
    end
  end
endmodule
