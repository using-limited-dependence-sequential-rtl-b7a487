// tb_ldse_variants: the encode-and-load flow on the 80 x 100 scan
// architecture with 8 tester channels for the other decompressor variants
// of the same family: 2-input XORs with one or two slice registers and
// 3-input XORs with one register (the default build is 3-input, two
// registers), next to the default one. 40 random cubes each, 0.5 % to 5 % specified bits; the run
// prints how many cubes each variant could encode.
module tb_ldse_variants;
  logic d0, d1, d2, d3;
  int   c0, f0, c1, f1, c2, f2, c3, f3;

  ldse_encode_harness #(.R(1), .Q(2), .CUBES(40), .PCT_LO(5), .PCT_HI(50), .NAME("2-xor 1-reg"))
    u_x2r1 (.done(d0), .checks(c0), .failures(f0));
  ldse_encode_harness #(.R(2), .Q(2), .CUBES(40), .PCT_LO(5), .PCT_HI(50), .NAME("2-xor 2-reg"))
    u_x2r2 (.done(d1), .checks(c1), .failures(f1));
  ldse_encode_harness #(.R(1), .Q(3), .CUBES(40), .PCT_LO(5), .PCT_HI(50), .NAME("3-xor 1-reg"))
    u_x3r1 (.done(d2), .checks(c2), .failures(f2));
  ldse_encode_harness #(.R(2), .Q(3), .CUBES(40), .PCT_LO(5), .PCT_HI(50), .NAME("3-xor 2-reg"))
    u_x3r2 (.done(d3), .checks(c3), .failures(f3));

  initial begin
    #100ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end
endmodule
