// End-to-end test of the deblocking filter on a 3x2-macroblock picture
// (48x32 luma): see tb_dbf_harness for what is checked.
module tb_h264_dbf_top;
  int checks, failures;
  bit finished;
  tb_dbf_harness #(.MBW(3), .MBH(2)) u_h (.checks, .failures, .finished);

  initial begin
    #(10 * 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  always @(posedge finished) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
