// tb_crossover - random parents and draws for the 8-bit clamped and the
// 12-bit wrapping instance, against the reference; plus the count of each
// of the five choices over all 256 draws (52/51/51/51/51).
module tb_crossover;
  import ga_ref_pkg::*;
  logic [7:0]  a1, a2, ay, r;
  logic [11:0] t1, t2, ty;
  int checks = 0, failures = 0;

  crossover #(.W(8),  .WRAP(1'b0)) dut_a (.x1(a1), .x2(a2), .r(r), .y(ay));
  crossover #(.W(12), .WRAP(1'b1)) dut_t (.x1(t1), .x2(t2), .r(r), .y(ty));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [5];
    longint w;
    for (int t = 0; t < 4000; t++) begin
      a1 = 8'($urandom); a2 = 8'($urandom); t1 = 12'($urandom); t2 = 12'($urandom);
      r  = 8'($urandom);
      if (t % 4 == 0) begin a1 = 8'd250; a2 = 8'd180; t1 = 12'd4000; t2 = 12'd3000; end
      #1;
      checks++;
      w = xo_ref(a1, a2, r, 8, 1'b0);
      if (longint'(ay) != w) begin failures++; $display("A: %0d %0d r=%0d got %0d want %0d", a1, a2, r, ay, w); end
      checks++;
      w = xo_ref(t1, t2, r, 12, 1'b1);
      if (longint'(ty) != w) begin failures++; $display("th: %0d %0d r=%0d got %0d want %0d", t1, t2, r, ty, w); end
    end
    // choice frequencies with parents 40 and 100: m-d=10, 40, 70, 100, m+d=130
    foreach (hist[i]) hist[i] = 0;
    a1 = 8'd40; a2 = 8'd100;
    for (int v = 0; v < 256; v++) begin
      r = 8'(v);
      #1;
      case (ay)
        8'd10:  hist[0]++;
        8'd40:  hist[1]++;
        8'd70:  hist[2]++;
        8'd100: hist[3]++;
        8'd130: hist[4]++;
        default: begin failures++; $display("unexpected point %0d", ay); end
      endcase
    end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (hist[i] != (i == 0 ? 52 : 51)) begin failures++; $display("choice %0d taken %0d times", i, hist[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
