// tb_mutation - every draw value against the reference at the edges and at
// random points, for the clamped 8-bit and the wrapping 12-bit instance;
// the number of draws that mutate must equal the rate (26 of 256).
module tb_mutation;
  import ga_ref_pkg::*;
  logic [7:0]  ax, ay, r;
  logic [11:0] tx, ty;
  logic        sgn;
  int checks = 0, failures = 0;

  mutation #(.W(8),  .WRAP(1'b0)) dut_a (.x(ax), .r(r), .sgn(sgn), .y(ay));
  mutation #(.W(12), .WRAP(1'b1)) dut_t (.x(tx), .r(r), .sgn(sgn), .y(ty));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int changed;
    longint w;
    int xs [4] = '{0, 255, 100, 4095};
    for (int i = 0; i < 4; i++)
      for (int s = 0; s < 2; s++)
        for (int v = 0; v < 256; v++) begin
          ax = 8'(xs[i]); tx = 12'(xs[i]); sgn = s[0]; r = 8'(v);
          #1;
          checks += 2;
          w = mut_ref(ax, v, s[0], 8, 1'b0, 26);
          if (longint'(ay) != w) begin failures++; $display("A x=%0d r=%0d s=%0d got %0d", ax, v, s, ay); end
          w = mut_ref(tx, v, s[0], 12, 1'b1, 26);
          if (longint'(ty) != w) begin failures++; $display("th x=%0d r=%0d s=%0d got %0d", tx, v, s, ty); end
        end
    changed = 0;
    ax = 8'd77; sgn = 1'b0;
    for (int v = 0; v < 256; v++) begin
      r = 8'(v); #1;
      if (ay != ax) changed++;
    end
    checks++;
    if (changed != 26) begin failures++; $display("mutated on %0d of 256 draws", changed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
