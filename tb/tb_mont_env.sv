// tb_mont_env: drives and checks one gf2m_mont_mult instance of field size
// M. It issues NOPS multiplications with random operands, in bursts where
// in_valid stays high (so the one-clock stall after every acceptance is
// exercised and tokens of consecutive products follow each other through
// the array without a gap) and with random idle clocks between bursts.
// Every result is compared with the reference Montgomery product, and the
// number of clocks from acceptance to out_valid must be (M+1)/2 + 3.
// Half of the products use the standard field polynomial and half a random
// G with g_0 = 1. Counts of the mechanisms seen are reported through ports.
module tb_mont_env #(
  parameter int M    = 7,
  parameter int NOPS = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls,        // clocks with in_valid high and in_ready low
  output int   back_to_back,  // acceptances two clocks after the previous one
  output int   random_polys,  // products checked with a random G
  output int   gaps           // idle stretches between bursts
);
  import gf2m_ref_pkg::*;

  localparam int R = (M + 1) / 2;
  localparam int LATENCY = R + 3;

  typedef struct {
    int    accepted;
    poly_t want;
    bit    random_g;
  } job_t;

  logic         in_valid = 1'b0, in_ready, out_valid;
  logic [M-1:0] a = '0, b = '0, g = '0, t;
  int           cycle = 0, last_accept = -10, issued = 0;
  bit           cur_random = 1'b0;
  job_t         q[$];

  gf2m_mont_mult #(.M(M)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .a, .b, .g, .out_valid, .t
  );

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    stalls = 0; back_to_back = 0; random_polys = 0; gaps = 0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) stalls++;
      if (in_valid && in_ready) begin
        job_t j;
        j.accepted = cycle;
        j.random_g = cur_random;
        j.want   = mont(poly_t'(a), poly_t'(b), poly_t'(g), M);
        q.push_back(j);
        if (cycle - last_accept == 2) back_to_back++;
        last_accept <= cycle;
        issued++;
      end
      if (out_valid) begin
        job_t j;
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL m=%0d unexpected result", M);
        end else begin
          j = q.pop_front();
          if (t !== M'(j.want) || cycle - j.accepted != LATENCY) begin
            failures++;
            $display("FAIL m=%0d t=%h expected %h, latency %0d expected %0d",
                     M, t, M'(j.want), cycle - j.accepted, LATENCY);
          end
          if (j.random_g) random_polys++;
        end
      end
    end
  end

  // Operand driver: new operands whenever the previous ones were taken.
  initial begin
    @(posedge rst_n);
    while (issued < NOPS) begin
      @(negedge clk);
      if (!in_valid || last_accept == cycle - 1) begin
        if (in_valid && ($urandom % 4) == 0) begin
          in_valid = 1'b0;                 // end of a burst: idle clocks
          repeat (1 + $urandom % 4) @(negedge clk);
          gaps++;
        end else begin
          in_valid   = 1'b1;
          cur_random = ($urandom % 2) == 1;
          a = M'(rand_poly(M));
          b = M'(rand_poly(M));
          g = M'(field_g(M, cur_random));
        end
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LATENCY + 4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL m=%0d: %0d results never came out", M, q.size());
    end
    done = 1'b1;
  end
endmodule
