// Testbench for error_detection (three predicted carries): all 64
// combinations of real and predicted carry-outs; Err_block must mark every
// position where they differ and Error must be 1 exactly when one does.
module tb_error_detection;
  logic [2:0] c_out, c_pred, err_block;
  logic       er;
  int checks = 0, failures = 0;

  error_detection #(.NB(3)) dut (.c_out(c_out), .c_pred(c_pred), .err_block(err_block), .er(er));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic any;
      {c_out, c_pred} = 6'(v);
      #1;
      any = 1'b0;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (err_block[i] !== (c_out[i] != c_pred[i])) begin
          failures++; $display("bit %0d: c_out=%b c_pred=%b err=%b", i, c_out, c_pred, err_block);
        end
        if (c_out[i] != c_pred[i]) any = 1'b1;
      end
      checks++;
      if (er !== any) begin failures++; $display("er wrong: c_out=%b c_pred=%b er=%b", c_out, c_pred, er); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
