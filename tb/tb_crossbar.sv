// tb_crossbar: random words and selects on the 5x5, 54-bit crossbar; each
// output must equal the selected input word, or zero when not enabled.
module tb_crossbar;
  localparam int unsigned N = 5;
  localparam int unsigned W = 54;
  int checks = 0;
  int failures = 0;

  logic [N-1:0][W-1:0] in_data, out_data;
  logic [N-1:0][2:0]   sel;
  logic [N-1:0]        sel_en;

  crossbar dut (.in_data, .sel, .sel_en, .out_data);

  initial begin
    for (int c = 0; c < 2000; c++) begin
      for (int i = 0; i < N; i++) begin
        in_data[i] = {22'($urandom), $urandom};
        sel[i]     = 3'($urandom_range(N - 1, 0));
        sel_en[i]  = ($urandom_range(3, 0) != 0);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        logic [W-1:0] e;
        e = sel_en[o] ? in_data[sel[o]] : '0;
        checks++;
        if (out_data[o] !== e) begin
          failures++;
          $display("FAIL out %0d sel %0d en %0d", o, sel[o], sel_en[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
