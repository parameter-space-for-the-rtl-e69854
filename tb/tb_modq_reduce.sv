// tb_modq_reduce: checks the modulo-q reduction (q = 2^224 + 1) for random
// signed inputs of product width (2V+5 bits) and of sum width (V+3 bits),
// including the extreme values. The check is (x - y) mod q == 0, computed with
// the wide % operator, and that the residue stays within its stated range.
module tb_modq_reduce;
  localparam int unsigned V   = 224;
  localparam int unsigned IW1 = 2 * V + 5;
  localparam int unsigned IW2 = V + 3;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [IW1-1:0] x1;
  logic signed [IW2-1:0] x2;
  logic signed [V+1:0]   y1, y2;

  modq_reduce #(.V(V), .IW(IW1)) dut1 (.x(x1), .y(y1));
  modq_reduce #(.V(V), .IW(IW2)) dut2 (.x(x2), .y(y2));

  typedef logic signed [1023:0] w_t;
  w_t q;

  task automatic check(input w_t x, input w_t y, input int unsigned slack);
    w_t diff, lim;
    diff = x - y;
    lim  = (w_t'(1) <<< V) + w_t'(slack);
    checks++;
    if ((diff % q) != 0 || y > lim || y < -lim) begin
      failures++;
      $display("mismatch x=%h y=%h", x, y);
    end
  endtask

  initial begin
    q = (w_t'(1) <<< V) + 1;
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < IW1; k += 32) x1[k +: 32] = $urandom;
      for (int k = 0; k < IW2; k += 32) x2[k +: 32] = $urandom;
      if (i == 0) begin x1 = {1'b0, {(IW1-1){1'b1}}}; x2 = {1'b1, {(IW2-1){1'b0}}}; end
      if (i == 1) begin x1 = {1'b1, {(IW1-1){1'b0}}}; x2 = {1'b0, {(IW2-1){1'b1}}}; end
      if (i == 2) begin x1 = '0; x2 = '1; end
      #1;
      check(w_t'(x1), w_t'(y1), 1 << (IW1 - 2 * V));
      check(w_t'(x2), w_t'(y2), 1 << (IW2 - V));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
