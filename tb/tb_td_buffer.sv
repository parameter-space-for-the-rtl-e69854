// tb_td_buffer: random pair writes into the word buffer (d = 64, s = 32) and
// random group reads; each read must return, one cycle later, the words at
// the bit-reversed positions 4t..4t+3, or zero for positions >= s, against a
// reference array.
module tb_td_buffer;
  import fftm3_pkg::*;
  localparam int unsigned D = 64, S = 32, WW = 99, DW = 226, LOGD = 6;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic we;
  logic [4:0] widx;
  logic [WW-1:0] w0, w1;
  logic [3:0] raddr;
  logic [DW-1:0] rdata [4];
  td_buffer #(.D(D), .WW(WW), .DW(DW)) dut (.*);

  logic [WW-1:0] ref_w [S];
  logic [DW-1:0] e [4];

  function automatic logic [WW-1:0] rnd();
    logic [WW-1:0] r;
    for (int i = 0; i < 4; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    we = 0; widx = 0; w0 = 0; w1 = 0; raddr = 0;
    // fill all words first
    for (int i = 0; i < S; i += 2) begin
      @(negedge clk);
      we = 1; widx = i; w0 = rnd(); w1 = rnd();
      ref_w[i] = w0; ref_w[i + 1] = w1;
    end
    @(negedge clk); we = 0;
    for (int it = 0; it < 2000; it++) begin
      logic [3:0] ra;
      @(negedge clk);
      ra = $urandom;
      raddr = ra;
      we = $urandom % 2;
      widx = ($urandom % S) & ~5'd1;
      w0 = rnd(); w1 = rnd();
      // a read in the cycle of a write returns the old word
      for (int k = 0; k < 4; k++) begin
        int unsigned pos;
        pos = 0;
        for (int b = 0; b < LOGD; b++) if (((4 * ra + k) >> b) & 1) pos |= 1 << (LOGD - 1 - b);
        e[k] = (pos < S) ? DW'(ref_w[pos]) : '0;
      end
      @(posedge clk);
      if (we) begin ref_w[widx] = w0; ref_w[widx + 1] = w1; end
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rdata[k] != e[k]) begin
          failures++; $display("group %0d word %0d: got %h exp %h", ra, k, rdata[k], e[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
