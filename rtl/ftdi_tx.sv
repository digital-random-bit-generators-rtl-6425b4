// ftdi_tx: byte writer for an FTDI USB FIFO chip in FT245-style FIFO mode.
//
// The chip signals with ftdi_txe_n low that its transmit FIFO can take a
// byte; the FPGA then drives ftdi_data and raises the write strobe ftdi_wr,
// and the chip stores the byte on the falling edge of the strobe. After a
// write the chip may raise ftdi_txe_n while it is busy or full. The sequence,
// at the system clock:
//   IDLE    - wait for a byte (in_valid) and a free FIFO (synchronised
//             ftdi_txe_n low); take the byte (in_ready pulses for one clock).
//   STROBE  - ftdi_wr high for WR_CYCLES clocks with the data on the bus.
//   HOLD    - ftdi_wr low, data still driven for one clock.
//   RECOVER - RECOVER_CYCLES + 1 clocks before ftdi_txe_n is looked at again, so
//             the chip's busy indication after a write is not missed.
// ftdi_txe_n passes through a two-flop synchroniser because it comes from
// another clock domain. The document says only that bytes reach the PC
// through an FTDI device and USB 2.0; the FIFO mode, the strobe polarity and
// the cycle counts (50 ns strobe, 80 ns recovery at 100 MHz) are assumptions
// of this design. The chip's read direction is not used.
module ftdi_tx #(
  parameter int unsigned WR_CYCLES      = 5,
  parameter int unsigned RECOVER_CYCLES = 8
) (
  input  logic       clk,
  input  logic       rst_n,        // synchronous, active low
  input  logic [7:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] ftdi_data,
  output logic       ftdi_wr,      // write strobe, data taken on its fall
  input  logic       ftdi_txe_n    // low: chip can accept a byte
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [1:0] {
    TX_IDLE    = 2'd0,
    TX_STROBE  = 2'd1,
    TX_HOLD    = 2'd2,
    TX_RECOVER = 2'd3
  } tx_state_t;

  localparam int unsigned CW = $clog2(((WR_CYCLES > RECOVER_CYCLES) ? WR_CYCLES : RECOVER_CYCLES) + 1);

  tx_state_t     state;
  logic [CW-1:0] cnt;
  logic [1:0]    txe_sync;
  logic          can_write;

  always_ff @(posedge clk) begin
    if (!rst_n) txe_sync <= 2'b11;
    else        txe_sync <= {txe_sync[0], ftdi_txe_n};
  end

  assign can_write = !txe_sync[1];
  assign in_ready  = (state == TX_IDLE) && can_write;
  assign ftdi_wr   = (state == TX_STROBE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= TX_IDLE;
      cnt       <= '0;
      ftdi_data <= '0;
    end else begin
      unique case (state)
        TX_IDLE: if (in_valid && can_write) begin
          ftdi_data <= in_data;
          cnt       <= CW'(WR_CYCLES - 1);
          state     <= TX_STROBE;
        end
        TX_STROBE: if (cnt == '0) state <= TX_HOLD;
                   else           cnt   <= cnt - 1'b1;
        TX_HOLD: begin
          cnt   <= CW'(RECOVER_CYCLES);
          state <= TX_RECOVER;
        end
        TX_RECOVER: if (cnt == '0) state <= TX_IDLE;
                    else           cnt   <= cnt - 1'b1;
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
