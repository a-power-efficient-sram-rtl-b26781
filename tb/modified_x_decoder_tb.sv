// modified_x_decoder_tb: exhaustive check of the two-GWL row decoder.
// For every address, with the decoder enabled and disabled, the GWL vector is compared
// with a reference built bit by bit: GWL a and GWL a+1 high (only a for the last row), all
// others low, and nothing at all when disabled.
module modified_x_decoder_tb;
  localparam int unsigned NGWL = 200;
  logic             en;
  logic [7:0]       addr;
  logic [NGWL-1:0]  gwl;
  int checks = 0, failures = 0;

  modified_x_decoder #(.NGWL(NGWL)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NGWL-1:0] exp_v;
    int ones;
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < NGWL; a++) begin
        en   = 1'(e);
        addr = 8'(a);
        #1;
        exp_v = '0;
        if (e == 1) begin
          exp_v[a] = 1'b1;
          if (a + 1 < NGWL) exp_v[a+1] = 1'b1;
        end
        ones = $countones(gwl);
        checks++;
        if (gwl !== exp_v || ones != (e == 0 ? 0 : (a + 1 < NGWL ? 2 : 1))) begin
          failures++;
          $display("addr %0d en %0d: got %h", a, e, gwl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
