// proc_block: reconfigurable processing module (pipelined computation unit).
//
// Holds the three engines and routes the pixel stream from the controller
// to the one that the mode selects:
//   median : window3x3 -> median3x3          (noise removal)
//   Sobel  : window3x3 -> sobel3x3           (edge detection)
//   DCT    : 8 pixels gathered into a row -> dct2d -> idct2d -> row
//            serialiser with clamping to 0..255 (compression and
//            reconstruction)
// and returns one stream of result pixels. Each engine runs on its own
// gated clock (clock_gate), enabled only while a frame is being processed in
// its mode, so the idle engines do not toggle. The DCT coefficients are also
// brought out (coef_valid/coef_col) so that they can be observed or stored.
// The engine set and the gated clocks follow the paper; the gathering of
// rows, the pacing of the IDCT output (one row every 8 clocks, matching the
// serialiser) and the output multiplexer are this design's choice.
//
// Ports: active (a frame is in progress), mode, width, height, scan_en
// (forces the gated clocks on); in_valid, in_pix, in_x, in_y from the
// controller; out_valid, out_pix; coef_valid, coef_col.
// Timing: median and Sobel results appear 2 clocks after the input that
// completes their window. A DCT block is returned after its 64 pixels plus
// roughly 30 clocks, at one pixel per clock.
module proc_block
  import imgproc_pkg::*;
#(
  parameter int unsigned MAX_W  = 256,
  parameter int unsigned MAX_H  = 256,
  parameter int unsigned COEF_W = 12,
  parameter int unsigned XW     = $clog2(MAX_W + 1),
  parameter int unsigned YW     = $clog2(MAX_H + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     active,
  input  mode_e                    mode,
  input  logic [XW-1:0]            width,
  input  logic [YW-1:0]            height,
  input  logic                     scan_en,
  input  logic                     in_valid,
  input  pixel_t                   in_pix,
  input  logic [XW-1:0]            in_x,
  input  logic [YW-1:0]            in_y,
  output logic                     out_valid,
  output pixel_t                   out_pix,
  output logic                     coef_valid,
  output logic signed [COEF_W-1:0] coef_col [8]
);
  // ---------------------------------------------------------------- clocks
  logic clk_win, clk_med, clk_sob, clk_dct;
  logic en_med, en_sob, en_dct;

  assign en_med = active && (mode == MODE_MEDIAN);
  assign en_sob = active && (mode == MODE_SOBEL);
  assign en_dct = active && (mode == MODE_DCT);

  clock_gate u_cg_win (.clk, .en(en_med | en_sob), .test_en(scan_en), .gclk(clk_win));
  clock_gate u_cg_med (.clk, .en(en_med),          .test_en(scan_en), .gclk(clk_med));
  clock_gate u_cg_sob (.clk, .en(en_sob),          .test_en(scan_en), .gclk(clk_sob));
  clock_gate u_cg_dct (.clk, .en(en_dct),          .test_en(scan_en), .gclk(clk_dct));

  // ----------------------------------------------------- median and Sobel
  logic   win_valid, win_border;
  pixel_t win [3][3];
  logic   med_valid, sob_valid;
  pixel_t med_pix, sob_pix;

  window3x3 #(.MAX_W(MAX_W), .XW(XW), .YW(YW)) u_win (
    .clk(clk_win), .rst_n,
    .in_valid(in_valid && (mode != MODE_DCT)), .in_pix, .in_x, .in_y,
    .width, .height,
    .out_valid(win_valid), .win, .border(win_border)
  );

  median3x3 u_med (
    .clk(clk_med), .rst_n, .in_valid(win_valid && (mode == MODE_MEDIAN)),
    .win, .border(win_border), .out_valid(med_valid), .out_pix(med_pix)
  );

  sobel3x3 u_sob (
    .clk(clk_sob), .rst_n, .in_valid(win_valid && (mode == MODE_SOBEL)),
    .win, .border(win_border), .out_valid(sob_valid), .out_pix(sob_pix)
  );

  // ------------------------------------------------------------ DCT path
  pixel_t     row_buf [8];
  logic       row_valid;
  pixel_t     row_q [8];
  logic       idct_ready, idct_valid;
  logic [2:0] pace;
  logic signed [COEF_W-1:0] rec_row [8];
  pixel_t     ser [8];
  logic [3:0] ser_left;

  // Gather eight pixels of a block row.
  always_ff @(posedge clk_dct or negedge rst_n) begin
    if (!rst_n) begin
      row_valid <= 1'b0;
    end else begin
      row_valid <= in_valid && (mode == MODE_DCT) && (in_x[2:0] == 3'd7);
    end
  end

  always_ff @(posedge clk_dct) begin
    if (in_valid && (mode == MODE_DCT)) begin
      row_buf[in_x[2:0]] <= in_pix;
      if (in_x[2:0] == 3'd7) begin
        for (int i = 0; i < 7; i++) row_q[i] <= row_buf[i];
        row_q[7] <= in_pix;
      end
    end
  end

  dct2d #(.MID_W(COEF_W), .OUT_W(COEF_W)) u_dct (
    .clk(clk_dct), .rst_n, .in_valid(row_valid), .in_row(row_q),
    .out_valid(coef_valid), .out_col(coef_col)
  );

  // One reconstructed row is requested every 8 clocks, the rate at which the
  // serialiser below empties.
  always_ff @(posedge clk_dct or negedge rst_n) begin
    if (!rst_n) pace <= '0;
    else        pace <= pace + 3'd1;
  end
  assign idct_ready = (pace == 3'd0);

  idct2d #(.IN_W(COEF_W), .MID_W(COEF_W), .OUT_W(COEF_W)) u_idct (
    .clk(clk_dct), .rst_n, .in_valid(coef_valid), .in_col(coef_col),
    .out_ready(idct_ready), .out_valid(idct_valid), .out_row(rec_row)
  );

  // Row serialiser with clamping to the pixel range.
  always_ff @(posedge clk_dct or negedge rst_n) begin
    if (!rst_n) begin
      ser_left <= '0;
    end else if (idct_valid) begin
      ser_left <= 4'd8;
    end else if (ser_left != '0) begin
      ser_left <= ser_left - 4'd1;
    end
  end

  always_ff @(posedge clk_dct) begin
    if (idct_valid) begin
      for (int i = 0; i < 8; i++) begin
        if (rec_row[i] < 0)                        ser[i] <= 8'd0;
        else if (rec_row[i] > COEF_W'(signed'(255))) ser[i] <= 8'd255;
        else                                       ser[i] <= rec_row[i][7:0];
      end
    end else if (ser_left != '0) begin
      for (int i = 0; i < 7; i++) ser[i] <= ser[i+1];
    end
  end

  a_ser_free: assert property (@(posedge clk_dct) disable iff (!rst_n)
    idct_valid |-> (ser_left <= 4'd1))
    else $error("proc_block: reconstructed row arrived before the previous one was sent");

  // ------------------------------------------------------------ output mux
  always_comb begin
    unique case (mode)
      MODE_MEDIAN: begin out_valid = med_valid;           out_pix = med_pix; end
      MODE_SOBEL:  begin out_valid = sob_valid;           out_pix = sob_pix; end
      MODE_DCT:    begin out_valid = (ser_left != '0);    out_pix = ser[0];  end
      default:     begin out_valid = 1'b0;                out_pix = '0;      end
    endcase
  end
endmodule
