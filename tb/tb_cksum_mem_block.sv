// tb_cksum_mem_block: writes random words to random addresses of the memory
// block, keeps a shadow copy, and checks that every word of the parallel
// read port matches the shadow after each write; also checks reset clears
// the contents.
module tb_cksum_mem_block;
  import cksum_pkg::*;

  localparam int unsigned DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  logic [7:0] wr_addr = '0;
  word_t wr_data = '0;
  word_t words [DEPTH];
  word_t shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cksum_mem_block dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr),
                       .wr_data(wr_data), .words(words));

  task automatic compare_all();
    int bad = 0;
    for (int i = 0; i < DEPTH; i++) if (words[i] !== shadow[i]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0d words differ", bad);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare_all();
    for (int i = 0; i < 600; i++) begin
      wr_en   = 1'b1;
      wr_addr = 8'($urandom);
      wr_data = word_t'($urandom);
      @(negedge clk);
      shadow[wr_addr] = wr_data;
      wr_en = ($urandom_range(1) == 1);
      wr_data = ~wr_data;
      if (wr_en) begin
        @(negedge clk);
        shadow[wr_addr] = wr_data;
      end
      wr_en = 1'b0;
      @(negedge clk);
      compare_all();
    end
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
