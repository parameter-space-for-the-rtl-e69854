// tb_ram_sdp: writes random data to every address of a 16 x 226 simple
// dual-port RAM, reads it back with the one-cycle latency, and checks that a
// read of the address being written returns the old contents and that a
// write with we low changes nothing.
module tb_ram_sdp;
  localparam int unsigned DW = 226, DEPTH = 16, AW = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];

  ram_sdp #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic logic [DW-1:0] rnd();
    logic [DW-1:0] r;
    for (int k = 0; k < DW; k += 32) r[k +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rnd(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("addr %0d read wrong", a); end
    end
    // write and read the same address in one cycle: old data, then new
    @(negedge clk); we = 1; waddr = 4'd5; raddr = 4'd5; wdata = rnd();
    @(negedge clk); we = 0;
    checks++;
    if (rdata !== model[5]) begin failures++; $display("read-during-write not old data"); end
    model[5] = wdata;
    @(negedge clk);
    checks++;
    if (rdata !== model[5]) begin failures++; $display("new data not visible"); end
    // we low: no change
    @(negedge clk); we = 0; waddr = 4'd7; wdata = rnd(); raddr = 4'd7;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (rdata !== model[7]) begin failures++; $display("write without we changed data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
