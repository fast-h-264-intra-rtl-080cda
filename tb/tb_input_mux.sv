// tb_input_mux: random words on all 32 inputs and a random pointer each step;
// the output must be the pointed-at word and the pop lines one-hot on the
// pointer when taken, all zero otherwise.
module tb_input_mux;
  import h264_pkg::*;
  localparam int NS = 32;
  blk_t                inw [NS];
  logic [STREAM_W-1:0] sel;
  logic                take;
  blk_t                wo;
  logic [NS-1:0]       pop;
  input_mux #(.NS(NS)) dut (.in_word_i(inw), .sel_i(sel), .take_i(take), .word_o(wo), .pop_o(pop));
  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 300; t++) begin
      int s;
      for (int i = 0; i < NS; i++) inw[i] = {$urandom, $urandom, $urandom, $urandom};
      s = $urandom_range(0, NS - 1);
      sel = STREAM_W'(s);
      take = (t % 5 != 0);
      #1;
      checks++;
      if (wo != inw[s] || pop != (take ? (NS'(1) << s) : '0)) begin
        failures++; $display("FAIL step %0d sel %0d", t, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
