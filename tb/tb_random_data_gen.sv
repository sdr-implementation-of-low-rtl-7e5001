// Test of the pseudo-random bit source.  The first 32 bits out must be the
// seed, most significant bit first; every later bit must satisfy the
// recurrence of x^32 + x^22 + x^2 + x + 1 in output form,
// o[n+32] = o[n] ^ o[n+10] ^ o[n+30] ^ o[n+31].  Also checked: data_valid
// follows bit_en by one clock, the bit only changes on that strobe, and the
// stream is balanced within a few percent over 4000 bits.
module tb_random_data_gen;
  localparam logic [31:0] SEED = 32'hACE1_2468;
  logic clk = 1'b0, rst = 1'b1;
  logic bit_en = 1'b0, data, data_valid;
  int checks = 0, failures = 0;
  bit o [$];
  int ones = 0;

  random_data_gen #(.SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    chk(data == SEED[31], "first bit after reset");
    for (int n = 0; n < 4000; n++) begin
      // irregular gaps between strobes
      repeat ($urandom_range(3)) begin
        prev = data;
        @(posedge clk);
        chk(data == prev && !data_valid, "bit holds without strobe");
      end
      bit_en <= 1'b1;
      @(posedge clk);
      bit_en <= 1'b0;
      @(posedge clk);
      chk(data_valid, "data_valid one clock after bit_en");
      o.push_back(data);
    end
    // o[0] is the bit after the first shift; prepend the seed's top bit
    o.push_front(SEED[31]);
    for (int n = 0; n < 32; n++) chk(o[n] == SEED[31-n], $sformatf("seed bit %0d", n));
    for (int n = 0; n + 32 < o.size(); n++)
      chk(o[n+32] == (o[n] ^ o[n+10] ^ o[n+30] ^ o[n+31]), $sformatf("recurrence at %0d", n));
    foreach (o[n]) ones += int'(o[n]);
    chk(ones > 1850 && ones < 2150, $sformatf("balance %0d ones", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
