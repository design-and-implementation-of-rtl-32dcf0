// Exhaustive test of tag_comparator for 4-bit tags: every tag pair, with the
// block valid and invalid, against the expected equality and hit.
module tb_tag_comparator;
  localparam int unsigned TAG_W = 4;
  logic [TAG_W-1:0] a, b;
  logic v, equal, hit;
  int unsigned checks = 0, failures = 0;

  tag_comparator dut (.addr_tag(a), .stored_tag(b), .valid(v), .equal, .hit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**TAG_W; i++)
      for (int j = 0; j < 2**TAG_W; j++)
        for (int k = 0; k < 2; k++) begin
          a = TAG_W'(i); b = TAG_W'(j); v = (k != 0);
          #1;
          checks += 2;
          if (equal !== (i == j)) begin failures++; $display("FAIL equal %0d %0d", i, j); end
          if (hit !== (i == j && k != 0)) begin failures++; $display("FAIL hit %0d %0d %0d", i, j, k); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
