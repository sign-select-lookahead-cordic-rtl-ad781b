// tb_csa_tree: self-checking test of the carry-save multi-operand adder.
// Four instances (1, 3, 7 and 17 operands) get random operands, including
// all-ones and zero corner patterns; every sum is compared with a plain
// modulo-2^W addition done in the testbench.
module tb_csa_tree;
  localparam int W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] o1 [1];
  logic [W-1:0] o3 [3];
  logic [W-1:0] o7 [7];
  logic [W-1:0] o17 [17];
  logic [W-1:0] s1, s3, s7, s17;

  csa_tree #(.W(W), .NOPS(1))  u1  (.ops(o1),  .sum(s1));
  csa_tree #(.W(W), .NOPS(3))  u3  (.ops(o3),  .sum(s3));
  csa_tree #(.W(W), .NOPS(7))  u7  (.ops(o7),  .sum(s7));
  csa_tree #(.W(W), .NOPS(17)) u17 (.ops(o17), .sum(s17));

  function automatic logic [W-1:0] pick(input int mode);
    case (mode)
      0: return '1;
      1: return '0;
      default: return W'($urandom);
    endcase
  endfunction

  task automatic check(input string name, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] e;
    for (int t = 0; t < 500; t++) begin
      int mode;
      mode = (t < 4) ? t % 2 : 2;
      o1[0] = pick(mode);
      foreach (o3[i])  o3[i]  = pick(mode);
      foreach (o7[i])  o7[i]  = pick(mode);
      foreach (o17[i]) o17[i] = pick(mode);
      #1;
      check("n1", s1, o1[0]);
      e = '0; foreach (o3[i])  e += o3[i];  check("n3",  s3,  e);
      e = '0; foreach (o7[i])  e += o7[i];  check("n7",  s7,  e);
      e = '0; foreach (o17[i]) e += o17[i]; check("n17", s17, e);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
