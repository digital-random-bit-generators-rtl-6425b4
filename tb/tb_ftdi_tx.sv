// tb_ftdi_tx: checks the FTDI FIFO writer against a model of the chip.
//
// 300 random bytes are offered with random gaps. The chip model reports busy
// after each write for a random time, and now and then for a long time. The
// bytes the model stores must be the bytes offered, in order; every write
// strobe must last WR_CYCLES clocks (50 ns); no strobe may start once the
// chip has been busy long enough to be seen; the data must not change under
// the strobe; the writer must take a byte only when it reports in_ready, and
// the long busy periods must have held it back at least once.
module tb_ftdi_tx;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NB = 300;
  localparam int WRC = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] in_data = '0;
  logic in_valid = 1'b0, in_ready;
  logic [7:0] ftdi_data;
  logic ftdi_wr, ftdi_txe_n;
  int checks = 0, failures = 0, cycles = 0;

  ftdi_tx #(.WR_CYCLES(WRC), .RECOVER_CYCLES(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_valid(in_valid),
    .in_ready(in_ready), .ftdi_data(ftdi_data), .ftdi_wr(ftdi_wr),
    .ftdi_txe_n(ftdi_txe_n));

  ftdi_fifo_model #(.MAX_BYTES(NB)) chip (.wr(ftdi_wr), .data(ftdi_data), .txe_n(ftdi_txe_n));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] sent [NB];
  int nsent = 0, held = 0;

  // a stalled offer: valid, ready low while the chip is busy
  always @(posedge clk) if (rst_n && in_valid && !in_ready && ftdi_txe_n) held++;

  realtime rise_t = -1.0;
  always @(posedge ftdi_wr) if (rst_n) rise_t = $realtime;
  always @(negedge ftdi_wr) if (rise_t >= 0.0)
    chk($realtime - rise_t > WRC * 10 - 0.5 && $realtime - rise_t < WRC * 10 + 0.5,
        $sformatf("strobe width %0.1f ns", $realtime - rise_t));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (nsent < NB) begin
      @(negedge clk);
      if (!in_valid && $urandom_range(3, 0) == 0) begin
        in_valid = 1'b1;
        in_data  = 8'($urandom);
      end
      @(posedge clk);
      if (in_valid && in_ready) begin
        sent[nsent] = in_data;
        nsent++;
        #1 in_valid = 1'b0;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (100) @(posedge clk);
    chk(chip.n_rx == NB, $sformatf("bytes stored %0d", chip.n_rx));
    for (int i = 0; i < NB; i++)
      chk(chip.rx[i] == sent[i], $sformatf("byte %0d: %h expected %h", i, chip.rx[i], sent[i]));
    chk(chip.violations == 0, $sformatf("protocol violations %0d", chip.violations));
    chk(held > 0 && chip.n_long > 0, "busy chip held the writer back");
    $display("held %0d clocks, long busy %0d", held, chip.n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
