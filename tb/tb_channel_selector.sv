// tb_channel_selector: replays the length-32 example of the write-back order.
// The butterflies deliver, in cycle t = 0..7, coefficients 2t, 2t+1 on
// Btf_out0/1 and 2t+16, 2t+17 on Btf_out2/3 (the data are the coefficient
// indices). With sel alternating (t odd -> crossed) and one extra cycle, the
// outputs must be, per cycle:
//   RAM0/1: 0,1 | 16,17 | 4,5 | 20,21 | 8,9 | 24,25 | 12,13 | 28,29 | -
//   RAM2/3: -   | 2,3   | 18,19 | 6,7 | 22,23 | 10,11 | 26,27 | 14,15 | 30,31
// so that every coefficient lands in bank (index mod 4).
module tb_channel_selector;
  localparam int unsigned DW = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          sel;
  logic [DW-1:0] btf    [4];
  logic [DW-1:0] ram_in [4];

  channel_selector #(.DW(DW)) dut (.clk, .sel, .btf, .ram_in);

  int top_exp [9][2] = '{'{0,1}, '{16,17}, '{4,5}, '{20,21}, '{8,9}, '{24,25}, '{12,13}, '{28,29}, '{-1,-1}};
  int bot_exp [9][2] = '{'{-1,-1}, '{2,3}, '{18,19}, '{6,7}, '{22,23}, '{10,11}, '{26,27}, '{14,15}, '{30,31}};

  initial begin
    int seen [32];
    for (int i = 0; i < 32; i++) seen[i] = 0;
    for (int t = 0; t <= 8; t++) begin
      @(negedge clk);
      if (t < 8) begin
        btf[0] = DW'(2 * t);      btf[1] = DW'(2 * t + 1);
        btf[2] = DW'(2 * t + 16); btf[3] = DW'(2 * t + 17);
        sel = t[0];
      end else begin
        btf[0] = '1; btf[1] = '1; btf[2] = '1; btf[3] = '1;
        sel = 1'b0;
      end
      #1;
      for (int j = 0; j < 2; j++) begin
        if (top_exp[t][j] >= 0) begin
          checks++;
          if (ram_in[j] != DW'(top_exp[t][j]) || ram_in[j] % 4 != j) begin
            failures++; $display("cycle %0d RAM%0d_in = %0d", t, j, ram_in[j]);
          end else seen[ram_in[j]]++;
        end
        if (bot_exp[t][j] >= 0) begin
          checks++;
          if (ram_in[2 + j] != DW'(bot_exp[t][j]) || ram_in[2 + j] % 4 != 2 + j) begin
            failures++; $display("cycle %0d RAM%0d_in = %0d", t, 2 + j, ram_in[2 + j]);
          end else seen[ram_in[2 + j]]++;
        end
      end
    end
    for (int i = 0; i < 32; i++) begin
      checks++;
      if (seen[i] != 1) begin failures++; $display("coefficient %0d written %0d times", i, seen[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
