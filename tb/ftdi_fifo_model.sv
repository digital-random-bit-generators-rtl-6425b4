// ftdi_fifo_model: behavioural model of the write side of an FTDI USB FIFO
// chip in FT245-style FIFO mode, for testbenches only.
//
// The byte on `data` is stored on each falling edge of `wr`. After every
// write the chip reports busy: txe_n rises BUSY_DELAY_NS later and stays high
// for a random time of 1 to BUSY_MAX_NS; one write in LONG_EVERY instead
// holds txe_n high for LONG_BUSY_NS, standing for a full FIFO waiting on the
// USB host. The model records every byte, every strobe width, and counts
// protocol errors: a strobe that rises after txe_n has been high for longer
// than SYNC_NS (time the writer needs to see busy), or data that changes
// while the strobe is high. A strobe already high at time zero (a writer
// still waiting for its first reset clock) is ignored.
module ftdi_fifo_model #(
  parameter int unsigned BUSY_DELAY_NS = 10,
  parameter int unsigned BUSY_MAX_NS   = 60,
  parameter int unsigned LONG_EVERY    = 16,
  parameter int unsigned LONG_BUSY_NS  = 600,
  parameter int unsigned SYNC_NS       = 30,
  parameter int unsigned MAX_BYTES     = 65536
) (
  input  logic       wr,
  input  logic [7:0] data,
  output logic       txe_n
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0] rx [MAX_BYTES];
  int unsigned n_rx        = 0;
  int unsigned n_long      = 0;   // long busy periods inserted
  int unsigned violations  = 0;
  realtime     last_width  = 0.0;
  realtime     min_width   = 1.0e9;
  realtime     max_width   = 0.0;
  realtime     txe_rise_t  = 0.0;
  realtime     wr_rise_t   = 0.0;
  logic [7:0]  data_at_rise;
  int unsigned busy_token  = 0;
  bit          armed       = 1'b0;  // a rising edge of wr has been seen

  initial txe_n = 1'b0;

  always @(posedge wr) begin
    armed        = 1'b1;
    wr_rise_t    = $realtime;
    data_at_rise = data;
    if (txe_n && ($realtime - txe_rise_t > real'(SYNC_NS))) begin
      violations++;
      $display("ftdi model: write strobe while busy at %0t", $realtime);
    end
  end

  always @(negedge wr) if (armed) begin
    armed      = 1'b0;
    last_width = $realtime - wr_rise_t;
    if (last_width < min_width) min_width = last_width;
    if (last_width > max_width) max_width = last_width;
    if (data !== data_at_rise) begin
      violations++;
      $display("ftdi model: data changed under the strobe at %0t", $realtime);
    end
    if (n_rx < MAX_BYTES) rx[n_rx] = data;
    n_rx++;
    busy_token++;
    fork
      begin : busy
        int unsigned tok;
        int unsigned hold;
        tok = busy_token;
        if (LONG_EVERY != 0 && $urandom_range(LONG_EVERY - 1, 0) == 0) begin
          hold = LONG_BUSY_NS;
          n_long++;
        end else begin
          hold = $urandom_range(BUSY_MAX_NS, 1);
        end
        #(BUSY_DELAY_NS * 1ns);
        txe_n = 1'b1;
        txe_rise_t = $realtime;
        #(hold * 1ns);
        if (tok == busy_token) txe_n = 1'b0;
      end
    join_none
  end

endmodule
