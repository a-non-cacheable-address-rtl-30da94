// tb_cache_mem: random word writes with byte enables and tag writes against a
// reference copy kept in the testbench; every line's valid bit, tag and block
// are compared after each operation, and reset must clear all valid bits.
module tb_cache_mem;
  localparam int LINES = 8, WPL = 4, TAG_W = 5;
  logic clk = 0, rst_n = 0;
  logic [2:0] rd_index, wr_index, tag_index;
  logic rd_valid, wr_en, tag_we;
  logic [TAG_W-1:0] rd_tag, tag_data;
  logic [WPL-1:0][31:0] rd_block;
  logic [1:0] wr_word;
  logic [3:0] wr_be;
  logic [31:0] wr_data;
  int checks = 0, failures = 0;

  logic             r_valid [LINES];
  logic [TAG_W-1:0] r_tag   [LINES];
  logic [31:0]      r_data  [LINES][WPL];

  cache_mem #(.LINES(LINES), .WPL(WPL), .TAG_W(TAG_W), .DATA_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int l = 0; l < LINES; l++) begin
      rd_index = 3'(l);
      #1;
      checks++;
      if (rd_valid !== r_valid[l]) begin
        failures++; $display("FAIL line %0d valid %b exp %b", l, rd_valid, r_valid[l]);
      end
      if (r_valid[l]) begin
        if (rd_tag !== r_tag[l]) begin
          failures++; $display("FAIL line %0d tag %h exp %h", l, rd_tag, r_tag[l]);
        end
        for (int w = 0; w < WPL; w++)
          if (rd_block[w] !== r_data[l][w]) begin
            failures++; $display("FAIL line %0d word %0d %h exp %h", l, w, rd_block[w], r_data[l][w]);
          end
      end
    end
  endtask

  initial begin
    wr_en = 0; tag_we = 0; rd_index = 0; wr_index = 0; tag_index = 0;
    tag_data = 0; wr_word = 0; wr_be = 0; wr_data = 0;
    for (int l = 0; l < LINES; l++) begin
      r_valid[l] = 0; r_tag[l] = 0;
      for (int w = 0; w < WPL; w++) r_data[l][w] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare_all();
    // initialise every word fully, then tag the line
    for (int l = 0; l < LINES; l++) begin
      for (int w = 0; w < WPL; w++) begin
        @(negedge clk);
        wr_en = 1; wr_index = 3'(l); wr_word = 2'(w); wr_be = 4'hF; wr_data = $urandom;
        r_data[l][w] = wr_data;
        @(posedge clk); #1 wr_en = 0;
      end
      @(negedge clk);
      tag_we = 1; tag_index = 3'(l); tag_data = TAG_W'($urandom);
      r_tag[l] = tag_data; r_valid[l] = 1;
      @(posedge clk); #1 tag_we = 0;
      compare_all();
    end
    // random byte-enabled writes and retags
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      wr_en = 1; wr_index = 3'($urandom); wr_word = 2'($urandom);
      wr_be = 4'($urandom); wr_data = $urandom;
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) r_data[wr_index][wr_word][8*b +: 8] = wr_data[8*b +: 8];
      tag_we = ($urandom % 4 == 0); tag_index = 3'($urandom); tag_data = TAG_W'($urandom);
      if (tag_we) begin r_tag[tag_index] = tag_data; r_valid[tag_index] = 1; end
      @(posedge clk); #1 wr_en = 0; tag_we = 0;
      compare_all();
    end
    // reset clears all valid bits
    rst_n = 0; #1; rst_n = 1;
    for (int l = 0; l < LINES; l++) r_valid[l] = 0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
