// tb_chain_length_mux: drives every pair of adjacent one-hot chain-length
// words and both select values and checks the word passed to the ring.
module tb_chain_length_mux;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic       sel;
  logic [3:0] l_code, l1_code, ctrl;

  chain_length_mux dut (.sel(sel), .l_code(l_code), .l1_code(l1_code), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) begin
      for (int s = 0; s < 2; s++) begin
        l_code  = 4'b0001 << l;
        l1_code = 4'b0001 << (l + 1);
        sel     = s[0];
        #10;
        checks++;
        if (ctrl != (s ? (4'b0001 << (l + 1)) : (4'b0001 << l))) begin
          failures++;
          $display("FAIL L=%0d sel=%0d ctrl=%b", l + 1, s, ctrl);
        end
      end
    end
    // Arbitrary words: each bit must follow the selected input.
    repeat (50) begin
      l_code  = 4'($urandom);
      l1_code = 4'($urandom);
      sel     = 1'($urandom);
      #10;
      checks++;
      if (ctrl != (sel ? l1_code : l_code)) begin
        failures++;
        $display("FAIL sel=%0d a=%b b=%b ctrl=%b", sel, l_code, l1_code, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
