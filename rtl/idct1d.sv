// idct1d: 8-point one-dimensional inverse DCT, even/odd decomposed.
//
// Computes x_m = sum_n Z_n * (k_n/2) cos((2m+1) n pi / 16), the transpose of
// dct1d, with the same 8-bit cosine basis and the same shift-add
// precomputing units. The decomposition mirrors the forward transform:
//   even part  e_m = sum over n = 0,2,4,6 (basis d, b, f)
//   odd part   o_m = sum over n = 1,3,5,7 (basis a, c, e, g)
//   post-processing adders: x_m = e_m + o_m, x_(7-m) = e_m - o_m, m = 0..3.
// The paper states that an IDCT returns the spatial data but does not
// describe its structure; this transposed even/odd form is this design's.
//
// Ports: in_valid/z (eight signed IN_W coefficients), out_valid/x (eight
// signed OUT_W samples). Timing: one vector per clock, latency 2. Rounding
// (sum + 64) >>> 7 is applied after the post-processing adders.
module idct1d
  import imgproc_pkg::*;
#(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  z [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] x [8]
);
  localparam int unsigned PW = IN_W + 7;
  localparam int unsigned SW = PW + 3;

  logic signed [PW-1:0] p [8][7];

  for (genvar n = 0; n < 8; n++) begin : g_pre
    csd_precompute #(.IN_W(IN_W)) u_pre (.x(z[n]), .prod(p[n]));
  end

  logic signed [SW-1:0] e_c [4], o_c [4];

  always_comb begin
    e_c[0] = SW'(p[0][K_D]) + SW'(p[2][K_B]) + SW'(p[4][K_D]) + SW'(p[6][K_F]);
    e_c[1] = SW'(p[0][K_D]) + SW'(p[2][K_F]) - SW'(p[4][K_D]) - SW'(p[6][K_B]);
    e_c[2] = SW'(p[0][K_D]) - SW'(p[2][K_F]) - SW'(p[4][K_D]) + SW'(p[6][K_B]);
    e_c[3] = SW'(p[0][K_D]) - SW'(p[2][K_B]) + SW'(p[4][K_D]) - SW'(p[6][K_F]);
    o_c[0] = SW'(p[1][K_A]) + SW'(p[3][K_C]) + SW'(p[5][K_E]) + SW'(p[7][K_G]);
    o_c[1] = SW'(p[1][K_C]) - SW'(p[3][K_G]) - SW'(p[5][K_A]) - SW'(p[7][K_E]);
    o_c[2] = SW'(p[1][K_E]) - SW'(p[3][K_A]) + SW'(p[5][K_G]) + SW'(p[7][K_C]);
    o_c[3] = SW'(p[1][K_G]) - SW'(p[3][K_E]) + SW'(p[5][K_C]) - SW'(p[7][K_A]);
  end

  logic signed [SW-1:0] e_q [4], o_q [4];
  logic                 v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        e_q[i] <= '0;
        o_q[i] <= '0;
      end
    end else begin
      v1_q <= in_valid;
      if (in_valid) begin
        e_q <= e_c;
        o_q <= o_c;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int m = 0; m < 8; m++) x[m] <= '0;
    end else begin
      out_valid <= v1_q;
      if (v1_q) begin
        for (int m = 0; m < 4; m++) begin
          x[m]   <= OUT_W'((e_q[m] + o_q[m] + SW'(64)) >>> COEF_FRAC);
          x[7-m] <= OUT_W'((e_q[m] - o_q[m] + SW'(64)) >>> COEF_FRAC);
        end
      end
    end
  end
endmodule
