// tb_cmult: self-checking test of the pipelined complex multiplier.
// Random and corner-case operands (including the most negative value) are
// applied every clock; each result is compared, two clocks later, with the
// product computed here in 64-bit integers.
module tb_cmult;
  localparam int W = 16;
  localparam int NV = 500;
  logic clk = 0;
  logic signed [W-1:0] ar, ai, br, bi;
  logic signed [2*W:0] pr, pi;

  cmult #(.W(W)) dut (.clk, .ar, .ai, .br, .bi, .pr, .pi);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint er [NV], ei [NV];

  initial begin
    for (int v = 0; v < NV + 2; v++) begin
      @(negedge clk);
      if (v < NV) begin
        if (v == 0) begin
          ar = -32768; ai = -32768; br = -32768; bi = 32767;
        end else if (v == 1) begin
          ar = 32767; ai = -32768; br = 32767; bi = -32768;
        end else begin
          ar = W'($urandom); ai = W'($urandom); br = W'($urandom); bi = W'($urandom);
        end
        er[v] = longint'(ar) * longint'(br) - longint'(ai) * longint'(bi);
        ei[v] = longint'(ar) * longint'(bi) + longint'(ai) * longint'(br);
      end
      if (v >= 2) begin   // result of operands applied two clocks earlier
        checks++;
        if (longint'(pr) != er[v-2] || longint'(pi) != ei[v-2]) begin
          failures++;
          if (failures < 10) $display("vector %0d: got (%0d,%0d) expected (%0d,%0d)", v - 2, pr, pi, er[v-2], ei[v-2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
