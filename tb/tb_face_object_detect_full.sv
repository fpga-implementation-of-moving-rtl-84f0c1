// Full-size end-to-end test: face_object_detect_top with its default
// parameters (256x256 frames, 128x128 LL band, 32768-word transpose
// memories), three frame pairs, no input gaps; see tb_detect_harness.
module tb_face_object_detect_full;
  tb_detect_harness #(.W(256), .H(256), .DEFAULTS(1'b1), .GAPS(1'b0), .WATCHDOG(1000000)) h ();
endmodule
