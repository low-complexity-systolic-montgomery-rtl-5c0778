// tb_mmm_combine: checks the final adder for m = 7. Pairs of array results,
// D (bit-reversed, as the array delivers it) followed one clock later by C,
// are presented with random gaps between pairs. One clock after each C,
// t_valid must be high and t must equal C XOR D in natural bit order; at no
// other clock may t_valid be high.
module tb_mmm_combine;
  import mmm_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int M = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_in = 1'b0, t_valid;
  tok_kind_e kind_in = TOK_D;
  logic [M-1:0] p_in = '0, t;
  int checks = 0, failures = 0;

  mmm_combine #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_t(input logic v, input logic [M-1:0] val);
    @(posedge clk);
    #1;
    checks++;
    if (t_valid !== v || (v && t !== val)) begin
      failures++;
      $display("FAIL t_valid=%b t=%b expected valid=%b t=%b", t_valid, t, v, val);
    end
  endtask

  initial begin
    logic [M-1:0] c, d;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 200; n++) begin
      d = M'($urandom); c = M'($urandom);
      @(negedge clk);
      valid_in = 1'b1; kind_in = TOK_D; p_in = M'(rev(poly_t'(d), M));
      expect_t(1'b0, '0);
      @(negedge clk);
      valid_in = 1'b1; kind_in = TOK_C; p_in = c;
      expect_t(1'b1, c ^ d);
      repeat (1 + $urandom % 3) begin
        @(negedge clk);
        valid_in = 1'b0; p_in = M'($urandom);
        expect_t(1'b0, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
