// tb_b2t_encoder -- all 64 input words of the binary-to-thermometer
// encoder: word w must switch on min(max(w+16,0),32) cells from bit 0 up.
module tb_b2t_encoder;
  import dfadc_pkg::*;

  dac_word_t            word;
  logic [DAC_CELLS-1:0] cells;
  int checks = 0, failures = 0;

  b2t_encoder dut (.word, .cells);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32; v < 32; v++) begin
      int n;
      logic [63:0] exp_cells;
      word = dac_word_t'(v);
      #1;
      n = v + 16;
      if (n < 0) n = 0;
      if (n > 32) n = 32;
      exp_cells = (64'd1 << n) - 64'd1;
      checks++;
      if (cells !== exp_cells[DAC_CELLS-1:0]) begin
        failures++;
        $display("word=%0d cells=%h expected %h", v, cells, exp_cells[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
