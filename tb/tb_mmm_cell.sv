// tb_mmm_cell: exhaustive test of one array cell. All 32 input combinations
// are applied; one clock later c_out must equal c ^ (msb & g) ^ (b & a) and
// a_out, g_out must equal the a and g that were applied.
module tb_mmm_cell;
  logic clk = 1'b0;
  logic c_in, msb_in, a_in, g_in, b_in;
  logic c_out, a_out, g_out;
  int   checks = 0, failures = 0;

  mmm_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c_in, msb_in, a_in, g_in, b_in} = 5'(v);
      @(posedge clk);
      #1;
      checks++;
      if (c_out !== (v[4] ^ (v[3] & v[1]) ^ (v[0] & v[2])) || a_out !== v[2] || g_out !== v[1]) begin
        failures++;
        $display("FAIL v=%b c_out=%b a_out=%b g_out=%b", 5'(v), c_out, a_out, g_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
