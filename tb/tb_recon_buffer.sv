// tb_recon_buffer: eight independent pixel writes per clock to random words
// and lanes of the reconstructed pixel buffer (a column of a block lands in eight different words), also checked on the full-contents output, read back through the read port and
// compared with a model.
module tb_recon_buffer;
  import intra_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0]       wr_en = 0;
  logic [7:0][5:0]  wr_word = '0;
  logic [7:0][2:0]  wr_lane = '0;
  pix_t [7:0]       wr_pix = '0;
  logic [5:0]       rd_addr = 0;
  word_t            rd_data;
  word_t            contents [48];
  int model [48][8];
  int checks = 0, failures = 0;

  recon_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // clear every location first, one word per clock
    for (int w = 0; w < 48; w++) begin
      @(negedge clk);
      for (int p = 0; p < 8; p++) begin
        wr_en[p] = 1; wr_word[p] = 6'(w); wr_lane[p] = 3'(p); wr_pix[p] = pix_t'(w * 8 + p);
        model[w][p] = (w * 8 + p) % 256;
      end
    end
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int p = 0; p < 8; p++) begin
        // distinct targets: port p writes lane p of a random word
        wr_en[p]   = 1'($urandom % 2);
        wr_word[p] = 6'($urandom % 48);
        wr_lane[p] = 3'(p);
        wr_pix[p] = pix_t'($urandom);
        if (wr_en[p]) model[wr_word[p]][p] = int'(wr_pix[p]);
      end
      @(posedge clk);
      #1;
      wr_en = '0;
      for (int w = 0; w < 48; w += 7) begin
        rd_addr = 6'(w);
        #1;
        for (int l = 0; l < 8; l++) begin
          checks++;
          if (int'(rd_data[l]) != model[w][l] || int'(contents[w][l]) != model[w][l]) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d lane %0d", w, l);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
