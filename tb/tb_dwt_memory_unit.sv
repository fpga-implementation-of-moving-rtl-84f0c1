// Testbench for dwt_memory_unit: fills a small memory with random words
// through the write port (rd_wr = 0), reads every word back in a shuffled
// order through the read port (rd_wr = 1) and checks the one-clock read
// latency, and checks that wr_en is ignored while rd_wr = 1.
module tb_dwt_memory_unit;
  localparam int DEPTH = 64, W = 10, AW = $clog2(DEPTH);
  logic clk = 0, rst = 1, rd_wr = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] l_band = '0, transpose;
  int checks = 0, failures = 0;
  int model[DEPTH];
  int order[$];

  dwt_memory_unit #(.DEPTH(DEPTH), .W(W)) dut (
    .clk(clk), .rst(rst), .rd_wr(rd_wr), .wr_en(wr_en), .rd_en(rd_en),
    .wr_addr(wr_addr), .rd_addr(rd_addr), .l_band(l_band), .transpose(transpose));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rd_wr = 0; wr_en = 1; wr_addr = AW'(a);
      model[a] = int'($urandom_range(0, (1 << W) - 1));
      l_band = W'(model[a]);
    end
    // Write strobes while reading must not change the memory.
    @(negedge clk);
    rd_wr = 1; wr_en = 1; rd_en = 0; wr_addr = '0; l_band = ~W'(model[0]);
    for (int a = 0; a < DEPTH; a++) order.push_back(a);
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      rd_wr = 1; wr_en = 1; rd_en = 1; rd_addr = AW'(order[i]);
      @(negedge clk);
      rd_en = 0;
      rd_addr = AW'($urandom);
      checks++;
      if (int'(transpose) != model[order[i]]) begin
        failures++;
        $display("addr %0d: got %0d expected %0d", order[i], transpose, model[order[i]]);
      end
      @(negedge clk);
      checks++;
      if (int'(transpose) != model[order[i]]) begin
        failures++;
        $display("read register not held at addr %0d", order[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
