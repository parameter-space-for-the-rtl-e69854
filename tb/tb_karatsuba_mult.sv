// tb_karatsuba_mult: streams random 226-bit operand pairs (one per cycle, plus
// all-ones and zero corner cases) into the Karatsuba multiplier and compares
// each product, LAT = 1 + 3*4 = 13 cycles later, with the * operator.
// The fixed latency is checked by the alignment itself.
module tb_karatsuba_mult;
  localparam int unsigned W   = 226;
  localparam int unsigned LAT = 13;
  localparam int unsigned N   = 400;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  logic [2*W-1:0] expq [N + LAT];

  karatsuba_mult #(.W(W)) dut (.clk, .a, .b, .p);

  initial begin
    for (int c = 0; c < N + LAT; c++) begin
      @(negedge clk);
      if (c < N) begin
        for (int k = 0; k < W; k += 32) begin a[k +: 32] = $urandom; b[k +: 32] = $urandom; end
        if (c == 0) begin a = '1; b = '1; end
        if (c == 1) begin a = '0; b = '1; end
        if (c == 2) begin a = '1; b = 1; end
        expq[c] = (2 * W)'(a) * (2 * W)'(b);
      end
      if (c >= LAT) begin
        checks++;
        if (p !== expq[c - LAT]) begin
          failures++;
          $display("product %0d wrong", c - LAT);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
