// Testbench for cmd_signature: compares the Command Signature with a CRC-64
// computed by polynomial long division of (state * x^64) modulo the
// ECMA-182 generator, a different algorithm from the shift register in the
// design. The reference itself is first checked against the published
// CRC-64/ECMA-182 check value of "123456789". Also checks the one-cycle
// latency and that sig_valid holds.
module tb_cmd_signature;
  import td_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  cmd_state_t state;
  logic sig_valid;
  sig_t signature;
  int checks = 0, failures = 0;

  cmd_signature dut (.clk, .rst_n, .start, .state, .sig_valid, .signature);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [64:0] GEN = {1'b1, 64'h42F0_E1EB_A9EA_3693};

  // remainder of data(x) * x^64 mod GEN(x), data of n bits (MSB first)
  function automatic sig_t ref_crc(input logic [511:0] data, input int n);
    logic [575:0] r;
    r = '0;
    r[n+63 -: 512] = '0;
    for (int i = 0; i < n; i++) r[i+64] = data[i];
    for (int i = n + 63; i >= 64; i--)
      if (r[i]) r[i -: 65] = r[i -: 65] ^ GEN;
    return r[63:0];
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [511:0] d;
    sig_t exp, prev;
    d = '0;
    d[71:0] = "123456789";
    check(ref_crc(d, 72) == 64'h6C40_DF5F_0B49_7347, "reference model check value");
    state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!sig_valid, "sig_valid low after reset");
    prev = '0;
    for (int t = 0; t < 40; t++) begin
      for (int w = 0; w < ($bits(cmd_state_t) + 31) / 32; w++)
        state[w*32 +: 32] = $urandom;
      if (t == 0) state = '0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      d = '0;
      d[$bits(cmd_state_t)-1:0] = state;
      exp = ref_crc(d, $bits(cmd_state_t));
      check(sig_valid, "sig_valid one cycle after start");
      check(signature == exp, $sformatf("signature %h expected %h", signature, exp));
      if (t > 1) check(signature != prev, "different state, different signature");
      prev = signature;
      state = ~state;
      repeat (2) @(negedge clk);
      check(sig_valid && signature == exp, "signature holds until next start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
