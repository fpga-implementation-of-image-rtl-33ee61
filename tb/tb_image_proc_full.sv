// tb_image_proc_full: end-to-end test at full size with the processor's
// default parameters: 180x180 frames for the median and Sobel filters (the
// size of the noise-removal experiments) and 256x256 frames for the DCT,
// with and without back-pressure, plus one 256x256 Sobel frame; see tb_top_harness for what is checked.
module tb_image_proc_full;
  tb_top_harness #(.MW(180), .MH(180), .DW(256), .DH(256), .BACKPRESSURE(1)) h ();

  initial begin
    repeat (3000000) @(posedge h.clk);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
