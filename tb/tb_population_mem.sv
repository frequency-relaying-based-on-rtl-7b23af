// tb_population_mem - fills the next bank, swaps, reads every slot back
// through all read ports; checks that writes never touch the current bank.
module tb_population_mem;
  import ga_pkg::*;
  localparam int POP = 30;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, swap, cur_bank;
  logic [4:0] rd_idx [8];
  member_t rd_data [8];
  logic wr_en [3];
  logic [4:0] wr_idx [3];
  member_t wr_data [3];
  member_t model [2][POP];
  int checks = 0, failures = 0;

  population_mem #(.POP(POP), .NRD(8), .NWR(3)) dut (.clk(clk), .rst_n(rst_n), .swap(swap),
    .rd_idx(rd_idx), .rd_data(rd_data), .wr_en(wr_en), .wr_idx(wr_idx), .wr_data(wr_data), .cur_bank(cur_bank));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic member_t rm();
    return member_t'({$urandom, $urandom, $urandom});
  endfunction

  task automatic fill(int bank);
    // three ports write slots s, s+1, s+2 per clock into the next bank
    for (int s = 0; s < POP; s += 3) begin
      for (int w = 0; w < 3; w++) begin
        automatic member_t m = rm();
        wr_en[w] <= 1; wr_idx[w] <= 5'(s + w); wr_data[w] <= m;
        model[bank][s + w] = m;
      end
      @(posedge clk);
    end
    for (int w = 0; w < 3; w++) wr_en[w] <= 0;
  endtask

  task automatic read_all(int bank);
    for (int s = 0; s < POP; s++) begin
      for (int r = 0; r < 8; r++) rd_idx[r] = 5'((s + r) % POP);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (rd_data[r] !== model[bank][(s + r) % POP]) begin
          failures++; $display("bank %0d slot %0d port %0d wrong", bank, (s + r) % POP, r);
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; swap = 0;
    for (int w = 0; w < 3; w++) begin wr_en[w] = 0; wr_idx[w] = 0; wr_data[w] = '0; end
    for (int r = 0; r < 8; r++) rd_idx[r] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (cur_bank !== 1'b0) failures++;
    fill(1);                        // writes go to bank 1 while bank 0 is current
    swap <= 1; @(posedge clk); swap <= 0;
    #1 checks++; if (cur_bank !== 1'b1) failures++;
    read_all(1);
    fill(0);                        // now bank 0 is written; bank 1 must not change
    read_all(1);
    swap <= 1; @(posedge clk); swap <= 0;
    read_all(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
