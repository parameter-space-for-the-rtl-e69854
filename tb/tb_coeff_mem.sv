// tb_coeff_mem: fills every bank of every polynomial slot with distinct data
// (coefficient position p in bank p mod 4, address p/4), including writes to
// different addresses of different banks in one cycle, then reads each slot
// group by group and checks that one address returns four consecutive
// coefficients of the right slot.
module tb_coeff_mem;
  localparam int unsigned DW = 16, D = 64, NSLOT = 7, AW = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] raddr [NSLOT];
  logic [DW-1:0] rdata [NSLOT][4];
  logic          we    [NSLOT][4];
  logic [AW-1:0] waddr [NSLOT][4];
  logic [DW-1:0] wdata [NSLOT][4];

  coeff_mem #(.DW(DW), .D(D), .NSLOT(NSLOT)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  function automatic logic [DW-1:0] tag(int s, int p);
    return DW'(s * 256 + p);
  endfunction

  initial begin
    for (int s = 0; s < NSLOT; s++) begin
      raddr[s] = '0;
      for (int k = 0; k < 4; k++) begin we[s][k] = 0; waddr[s][k] = '0; wdata[s][k] = '0; end
    end
    // write: in cycle c, bank k of slot s gets address (c + k) mod 16
    for (int c = 0; c < D / 4; c++) begin
      @(negedge clk);
      for (int s = 0; s < NSLOT; s++)
        for (int k = 0; k < 4; k++) begin
          int a;
          a = (c + k) % (D / 4);
          we[s][k] = 1; waddr[s][k] = AW'(a); wdata[s][k] = tag(s, 4 * a + k);
        end
    end
    @(negedge clk);
    for (int s = 0; s < NSLOT; s++) for (int k = 0; k < 4; k++) we[s][k] = 0;
    for (int a = 0; a < D / 4; a++) begin
      for (int s = 0; s < NSLOT; s++) raddr[s] = AW'((a + s) % (D / 4));
      @(negedge clk);
      for (int s = 0; s < NSLOT; s++)
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (rdata[s][k] !== tag(s, 4 * ((a + s) % (D / 4)) + k)) begin
            failures++; $display("slot %0d bank %0d addr %0d wrong", s, k, (a + s) % (D / 4));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
