// End-to-end test of face_object_detect_top at 16x16 (8x8 LL band) with
// random input gaps; see tb_detect_harness for the scenes and checks.
module tb_face_object_detect_top;
  tb_detect_harness #(.W(16), .H(16), .DEFAULTS(1'b0), .GAPS(1'b1), .WATCHDOG(100000)) h ();
endmodule
