// bit_buffer: fill-then-send buffer between the generator and the USB link.
//
// The generator produces one bit per clock, far faster than a USB FIFO chip
// can carry, so bits are collected in on-chip memory and sent in bursts:
//   FILL - every valid input bit is shifted into a byte; each completed byte
//          is written to the next memory word. Bit k of a byte is the k-th bit
//          received (first bit in the LSB). After DEPTH bytes the buffer is
//          full and the controller turns to sending.
//   READ - one-cycle synchronous memory read of the next byte.
//   SEND - the byte is offered on out_data with out_valid high, held stable
//          until out_ready. After the last byte the buffer is flushed (both
//          pointers and the partial byte cleared) and FILL starts again.
// Bits arriving while the buffer is being sent are dropped, so each buffer
// holds 8*DEPTH consecutive generator bits. The fill-send-flush-repeat cycle
// follows the document; it requires the buffer size to be a parameter because
// the parts carry different amounts of memory but gives no size, so DEPTH
// (8192 bytes = 64 kbit) is this design's choice, as are the byte packing and
// the valid/ready handshake.
//
// Timing: a full fill takes exactly 8*DEPTH valid input bits; sending takes at
// least two clocks per byte. filling is high while input bits are accepted.
module bit_buffer
  import trng_pkg::*;
#(
  parameter int unsigned DEPTH = 8192,   // buffer size in bytes
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic       clk,
  input  logic       rst_n,      // synchronous, active low
  input  logic       bit_in,
  input  logic       bit_valid,
  output logic       filling,    // bits are being accepted
  output logic [7:0] out_data,
  output logic       out_valid,
  input  logic       out_ready
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0]    mem [DEPTH];
  logic [7:0]    mem_q;
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [6:0]    sh;             // bits of the byte being assembled
  logic [2:0]    nbits;          // how many of them are present
  buf_state_t    state;

  logic       wr_en, rd_en;
  logic [7:0] wr_byte;

  assign filling   = (state == BUF_FILL);
  assign wr_en     = filling && bit_valid && (nbits == 3'd7);
  assign wr_byte   = {bit_in, sh};
  assign rd_en     = (state == BUF_READ);
  assign out_valid = (state == BUF_SEND);
  assign out_data  = mem_q;

  // memory: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_byte;
    if (rd_en) mem_q <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= BUF_FILL;
      wr_ptr <= '0;
      rd_ptr <= '0;
      sh     <= '0;
      nbits  <= '0;
    end else begin
      unique case (state)
        BUF_FILL: if (bit_valid) begin
          sh    <= {bit_in, sh[6:1]};
          nbits <= nbits + 3'd1;
          if (nbits == 3'd7) begin
            if (wr_ptr == AW'(DEPTH - 1)) begin
              wr_ptr <= '0;
              state  <= BUF_READ;
            end else begin
              wr_ptr <= wr_ptr + 1'b1;
            end
          end
        end
        BUF_READ: state <= BUF_SEND;
        BUF_SEND: if (out_ready) begin
          if (rd_ptr == AW'(DEPTH - 1)) begin
            // flush: start a new buffer from empty
            rd_ptr <= '0;
            wr_ptr <= '0;
            sh     <= '0;
            nbits  <= '0;
            state  <= BUF_FILL;
          end else begin
            rd_ptr <= rd_ptr + 1'b1;
            state  <= BUF_READ;
          end
        end
        default: state <= BUF_FILL;
      endcase
    end
  end

  // an offered byte must stay put until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
