// tb_eroc_prime_gen: for several seeds (and the zero seed, which selects the
// built-in one) the generator must end with an odd prime of at least 2^31,
// checked here by trial division; different seeds must give different
// primes and the result must hold still once done.
module tb_eroc_prime_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [31:0] seed, prime;
  logic done;
  int checks = 0, failures = 0;
  logic [31:0] seen [5];

  eroc_prime_gen dut (.clk_i(clk), .rst_ni(rst_n), .seed_i(seed), .done_o(done), .prime_o(prime));

  function automatic bit is_prime(input logic [31:0] n);
    if (n < 2) return 0;
    if (n % 2 == 0) return n == 2;
    for (longint d = 3; d * d <= longint'(n); d += 2) if (n % 32'(d) == 0) return 0;
    return 1;
  endfunction

  task automatic check(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int s = 0; s < 5; s++) begin
      int cyc;
      rst_n = 1'b0;
      seed = (s == 0) ? 32'd0 : (s == 1) ? 32'h1234_5679 : (s == 2) ? 32'hDEAD_BEEF : (s == 3) ? 32'h0F1E_2D3C : 32'h7777_0001;
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      cyc = 0;
      while (!done) begin @(posedge clk); cyc++; end
      check(is_prime(prime), $sformatf("%0d is prime", prime));
      $display("seed %h -> R %0d after %0d cycles", seed, prime, cyc);
      check(prime[31] && prime[0], "large and odd");
      check(cyc >= 32768 / 2, $sformatf("a prime needs ~2^15 divisions (%0d cycles)", cyc));
      seen[s] = prime;
      repeat (5) @(posedge clk);
      check(done && prime == seen[s], "R held");
      for (int t = 0; t < s; t++) check(seen[t] != seen[s], "seeds give different primes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
