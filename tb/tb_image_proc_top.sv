// tb_image_proc_top: end-to-end test of the processor with its default
// parameters on small frames (32x24 for every mode), with back-pressure
// runs; see tb_top_harness for what is checked.
module tb_image_proc_top;
  tb_top_harness #(.MW(32), .MH(24), .DW(32), .DH(24), .BACKPRESSURE(1)) h ();

  initial begin
    repeat (400000) @(posedge h.clk);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end
endmodule
