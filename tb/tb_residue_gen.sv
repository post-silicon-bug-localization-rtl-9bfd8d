// tb_residue_gen: checks the mod-7 residue of 64-bit words and the mod-3
// residue of 7-bit register names against the % operator, for corner values
// (0, all ones, multiples of the modulus) and 2,000 random values each.
module tb_residue_gen;
  logic [63:0] v7;
  logic [2:0]  r7;
  logic [6:0]  v3;
  logic [1:0]  r3;
  int checks = 0, failures = 0;

  residue_gen #(.IN_W(64), .MOD(7)) dut7 (.value_i(v7), .residue_o(r7));
  residue_gen #(.IN_W(7),  .MOD(3)) dut3 (.value_i(v3), .residue_o(r3));

  task automatic check7(input logic [63:0] v);
    v7 = v; #1;
    checks++;
    if (64'(r7) != v % 64'd7) begin
      failures++;
      $display("FAIL mod7 %h: got %0d exp %0d", v, r7, v % 64'd7);
    end
  endtask
  task automatic check3(input logic [6:0] v);
    v3 = v; #1;
    checks++;
    if (7'(r3) != v % 7'd3) begin
      failures++;
      $display("FAIL mod3 %h: got %0d exp %0d", v, r3, v % 7'd3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check7('0); check7('1); check7(64'd7); check7(64'd49); check7(64'hFFFF_FFFF_FFFF_FFF8);
    for (int i = 0; i < 128; i++) check3(7'(i));
    for (int i = 0; i < 2000; i++) begin
      check7({$urandom, $urandom});
      check7(64'd7 * 64'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
