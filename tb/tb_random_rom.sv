// tb_random_rom - load a start position near the end of the table, advance
// through the wrap, and compare each port with its own copy of the table.
module tb_random_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, load, advance;
  logic [7:0] start_addr;
  logic [95:0] word [2];
  logic [95:0] ref_tab [256];
  int checks = 0, failures = 0;

  random_rom dut (.clk(clk), .rst_n(rst_n), .load(load), .start_addr(start_addr),
                  .advance(advance), .word(word));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_words(int a);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (word[i] !== ref_tab[(a + i) % 256]) begin
        failures++;
        $display("port %0d at %0d: got %h want %h", i, a, word[i], ref_tab[(a + i) % 256]);
      end
    end
  endtask

  initial begin
    int a;
    logic [95:0] held [2];
    $readmemh("rtl/random_table.hex", ref_tab);
    rst_n = 0; load = 0; advance = 0; start_addr = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // from reset the pointer is 0
    advance <= 1; @(posedge clk); advance <= 0; #1 expect_words(0);
    // start position 250: six advances cross the wrap
    load <= 1; start_addr <= 8'd250; @(posedge clk); load <= 0;
    a = 250;
    for (int s = 0; s < 6; s++) begin
      advance <= 1; @(posedge clk); #1 expect_words(a);
      a = (a + 2) % 256;
    end
    // words hold while advance is low, pointer does not move
    advance <= 0;
    held = word;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (word != held) begin failures++; $display("word changed without advance"); end
    advance <= 1; @(posedge clk); advance <= 0; #1 expect_words(a);
    // a different start position gives a different sequence
    load <= 1; start_addr <= 8'd17; @(posedge clk); load <= 0;
    advance <= 1; @(posedge clk); advance <= 0; #1 expect_words(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
