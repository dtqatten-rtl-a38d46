// tb_vssa_pe: self-checking test of one variable-speed PE.
//
// Plays the role of the array controller for a single PE: a step ends when
// the PE is no longer busy. Random operand pairs of random precision (4-bit
// codes -8..7, 8-bit codes -128..127) are loaded one per step; the test
// checks that every step takes 1, 2 or 4 cycles as the precisions require
// and that P equals the dot product computed here with plain integers.
module tb_vssa_pe;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, adv;
  logic [1:0] cyc;
  logic [7:0] a_in, b_in;
  logic a8, b8, av, bv;
  logic [7:0] ao, bo; logic a8o, b8o, avo, bvo;
  logic busy, mac, stall;
  logic signed [31:0] p;
  int checks = 0, failures = 0;
  int unsigned ncyc;

  always #5 clk = ~clk;

  vssa_pe #(.ACC_W(32)) dut (
    .clk, .rst_n, .clr, .adv, .cyc,
    .a_in, .a_is8_in(a8), .a_vld_in(av), .b_in, .b_is8_in(b8), .b_vld_in(bv),
    .a_out(ao), .a_is8_out(a8o), .a_vld_out(avo), .b_out(bo), .b_is8_out(b8o), .b_vld_out(bvo),
    .busy, .mac, .stall, .p
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rnd_val(input logic is8);
    int v;
    if (is8) v = $signed($urandom_range(255, 0)) - 128;
    else     v = $signed($urandom_range(15, 0)) - 8;
    return 8'(v);
  endfunction

  task automatic one_step(input logic [7:0] a, input logic ia8, input logic [7:0] b, input logic ib8);
    // load operands at a step boundary
    a_in = a; a8 = ia8; av = 1'b1; b_in = b; b8 = ib8; bv = 1'b1;
    adv = 1'b1; cyc = 2'd0; #1;
    @(posedge clk); #1;
    adv = 1'b0; av = 1'b0; bv = 1'b0;
    ncyc = 0;
    // run the step: cycle until the PE is no longer busy
    forever begin
      ncyc++;
      if (!busy) begin
        adv = 1'b1;
        @(posedge clk); #1;
        break;
      end
      @(posedge clk); #1;
      cyc = cyc + 2'd1; #1;
    end
    // operands of the next step are empty now
    adv = 1'b0; cyc = 2'd0;
  endtask

  initial begin
    longint expect_p;
    int exp_cyc;
    adv = 1'b0; cyc = '0; a_in = '0; b_in = '0; a8 = 0; b8 = 0; av = 0; bv = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      expect_p = 0;
      clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
      for (int s = 0; s < 8; s++) begin
        logic ia8, ib8; logic [7:0] a, b;
        ia8 = 1'($urandom()); ib8 = 1'($urandom());
        a = rnd_val(ia8); b = rnd_val(ib8);
        expect_p += longint'($signed(a)) * longint'($signed(b));
        exp_cyc = (ia8 && ib8) ? 4 : ((ia8 || ib8) ? 2 : 1);
        one_step(a, ia8, b, ib8);
        checks++;
        if (ncyc != exp_cyc) begin
          failures++;
          $display("FAIL step cycles %0d expected %0d (a8=%0b b8=%0b)", ncyc, exp_cyc, ia8, ib8);
        end
      end
      checks++;
      if (longint'(p) != expect_p) begin
        failures++;
        $display("FAIL p=%0d expected %0d", p, expect_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
