// Testbench for dwt_controller (ROWS=6, COLS=5): random write strobes must
// produce wr_addr 0,1,2,... with rd_wr = 0; after the last write rd_wr must
// rise and rd_addr must run through r*COLS + c, c outer and r inner, one
// address per clock (ROWS*COLS clocks), then rd_wr falls with pass2_done.
// Runs two frames.
module tb_dwt_controller;
  localparam int ROWS = 6, COLS = 5, AW = $clog2(ROWS*COLS);
  logic clk = 0, rst = 1, wr_strobe = 0;
  logic rd_wr, rd_en, pass2_start, pass2_done;
  logic [AW-1:0] wr_addr, rd_addr;
  int checks = 0, failures = 0;

  dwt_controller #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst(rst), .wr_strobe(wr_strobe), .rd_wr(rd_wr), .wr_addr(wr_addr),
    .rd_addr(rd_addr), .rd_en(rd_en), .pass2_start(pass2_start), .pass2_done(pass2_done));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("%s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      for (int a = 0; a < ROWS*COLS; ) begin
        @(negedge clk);
        wr_strobe = ($urandom_range(0, 1) != 0);
        check(rd_wr == 0 && rd_en == 0, "read phase during writes");
        if (wr_strobe) begin
          check(int'(wr_addr) == a, $sformatf("wr_addr %0d expected %0d", wr_addr, a));
          a++;
        end
      end
      @(negedge clk);
      wr_strobe = 0;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          check(rd_wr == 1 && rd_en == 1, "read phase ended early");
          check(pass2_start == (r == 0 && c == 0), "pass2_start wrong");
          check(int'(rd_addr) == r*COLS + c,
                $sformatf("rd_addr %0d expected %0d", rd_addr, r*COLS + c));
          @(negedge clk);
        end
      check(rd_wr == 0 && pass2_done == 1, "read phase did not end after ROWS*COLS clocks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
