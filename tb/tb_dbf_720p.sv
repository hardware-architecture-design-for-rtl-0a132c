// Workload test: a whole 1280x720 picture (80x45 macroblocks, 3600 in
// raster order, then the flush) through the deblocking filter, compared pixel
// by pixel with the reference, with the per-macroblock cycle count checked.
// At 298 cycles per macroblock the picture takes 1,072,838 cycles, i.e. 93.2
// pictures per second at 100 MHz.
module tb_dbf_720p;
  int checks, failures;
  bit finished;
  tb_dbf_harness #(.MBW(80), .MBH(45)) u_h (.checks, .failures, .finished);

  initial begin
    #(10 * 1600000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  always @(posedge finished) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
