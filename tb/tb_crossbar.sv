// tb_crossbar: self-checking test of the multiplexer crossbar.
// Random data, valids and selects; every output is compared with the input
// its select names, and must be invalid when its select is disabled.
module tb_crossbar;
  localparam int NIN = 10, NOUT = 5, W = 34;
  logic [W-1:0] in_data [NIN];
  logic [NIN-1:0] in_valid;
  logic [$clog2(NIN)-1:0] sel [NOUT];
  logic [NOUT-1:0] sel_en;
  logic [W-1:0] out_data [NOUT];
  logic [NOUT-1:0] out_valid;
  int checks = 0, failures = 0;

  crossbar #(.NIN(NIN), .NOUT(NOUT), .WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int s [NOUT];
      for (int i = 0; i < NIN; i++) in_data[i] = {$urandom(), $urandom()};
      in_valid = NIN'($urandom());
      sel_en   = NOUT'($urandom());
      for (int o = 0; o < NOUT; o++) begin
        s[o] = $urandom_range(0, NIN - 1);
        sel[o] = s[o][$clog2(NIN)-1:0];
      end
      #1;
      for (int o = 0; o < NOUT; o++) begin
        checks++;
        if (out_valid[o] != (sel_en[o] && in_valid[s[o]])) begin
          failures++; $display("FAIL valid out %0d", o);
        end
        if (sel_en[o]) begin
          checks++;
          if (out_data[o] != in_data[s[o]]) begin failures++; $display("FAIL data out %0d", o); end
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
