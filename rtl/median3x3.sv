// median3x3: median of a 3x3 window, for salt-and-pepper noise removal.
//
// Each of the nine pixels is ranked by counting how many others are smaller
// (ties broken by position, so the ranks are a permutation of 0..8); the
// pixel of rank 4 is the median. An isolated 0 or 255 impulse in a window
// therefore never reaches the output. Border centres (border = 1) pass their
// centre pixel through unchanged. The paper specifies a median filter on
// 3x3 blocks of a 180x180, 8-bit image; the rank-counting circuit and the
// border rule are this design's choice.
//
// Ports: in_valid, win[r][c], border; out_valid, out_pix.
// Timing: one window per clock, output registered, latency 1.
module median3x3
  import imgproc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t win [3][3],
  input  logic   border,
  output logic   out_valid,
  output pixel_t out_pix
);
  pixel_t v [9];
  pixel_t med;

  always_comb begin
    for (int i = 0; i < 9; i++) v[i] = win[i/3][i%3];
    med = v[4];
    for (int i = 0; i < 9; i++) begin
      logic [3:0] rank;
      rank = '0;
      for (int j = 0; j < 9; j++) begin
        if (j != i) begin
          if ((v[j] < v[i]) || ((v[j] == v[i]) && (j < i))) rank = rank + 4'd1;
        end
      end
      if (rank == 4'd4) med = v[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_pix <= border ? win[1][1] : med;
    end
  end
endmodule
