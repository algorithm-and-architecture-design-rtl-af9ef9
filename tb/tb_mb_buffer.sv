// tb_mb_buffer: random word writes into the 48-word MB buffer, checked
// through the read port and the full-contents output against a model array.
module tb_mb_buffer;
  import intra_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic       wr_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  word_t      wr_data = '0, rd_data;
  word_t      contents [48];
  word_t      model [48];
  int checks = 0, failures = 0;

  mb_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill, then random overwrites
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      wr_en   = (it < 48) ? 1'b1 : 1'($urandom % 2);
      wr_addr = (it < 48) ? 6'(it) : 6'($urandom % 48);
      wr_data = word_t'({$urandom, $urandom});
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      if (it >= 48) begin
        rd_addr = 6'($urandom % 48);
        #1;
        checks++;
        if (rd_data != model[rd_addr]) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d", rd_addr);
        end
        checks++;
        if (contents[it % 48] != model[it % 48]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
