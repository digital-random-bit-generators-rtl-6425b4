// tb_combined_trng: checks the complete ring-oscillator generator.
//
// The testbench samples the ring outputs itself on every clock edge and
// forms their parity; the bit presented after edge t must equal the parity
// taken at edge t - 2 (one sampling flop and two XOR steps for 15 rings in
// groups of 4, three flops in all). rnd_valid must rise on the third edge
// after reset and stay high,
// every ring must toggle several times per clock period, and the output must
// be roughly balanced (45 % to 55 % ones over 20000 bits).
module tb_combined_trng;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 15;
  localparam int LAT = 3;
  localparam int NBITS = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rnd_bit, rnd_valid;
  int checks = 0, failures = 0, cycles = 0;

  combined_trng #(.N(N), .FANIN(4)) dut (
    .clk(clk), .rst_n(rst_n), .rnd_bit(rnd_bit), .rnd_valid(rnd_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // parity of the ring levels seen at each edge
  logic par_hist [8];
  int   edge_no = 0;
  always @(posedge clk) begin
    par_hist[edge_no % 8] <= ^dut.ro_raw;
    edge_no <= edge_no + 1;
  end

  // toggle count of every ring
  int unsigned tog [N];
  for (genvar i = 0; i < N; i++) begin : g_tog
    initial tog[i] = 0;
    always @(dut.ro_raw[i]) tog[i]++;
  end

  initial begin
    int ones, vedge, rel;
    ones = 0;
    vedge = -1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    rel = edge_no;                 // first edge with reset released
    for (int i = 0; i < NBITS + 10; i++) begin
      @(posedge clk);
      #1;
      if (rnd_valid && vedge < 0) vedge = edge_no - 1 - rel;
      if (edge_no - 1 - rel >= LAT) begin
        chk(rnd_valid, "rnd_valid stays high");
        // bit after edge e is the parity seen at edge e-LAT+1
        chk(rnd_bit == par_hist[(edge_no - 1 - LAT + 1) % 8],
            $sformatf("rnd_bit at edge %0d", edge_no - 1));
        if (i < NBITS + 10 && rnd_bit) ones++;
      end
    end
    chk(vedge == LAT - 1, $sformatf("rnd_valid first high after edge %0d", vedge));
    for (int i = 0; i < N; i++)
      chk(tog[i] > 4 * (NBITS + 14), $sformatf("ring %0d toggles %0d", i, tog[i]));
    $display("ones: %0d of %0d", ones, NBITS);
    chk(ones > NBITS * 45 / 100 && ones < NBITS * 55 / 100, "output balance");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
