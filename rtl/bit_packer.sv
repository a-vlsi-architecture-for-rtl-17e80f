// bit_packer: serial packer of 14-bit codewords into bytes.
//
// A codeword is parallel-loaded into a codeword shift register while the
// packer is idle (BP_RDY high). When BP is asserted, the codeword is
// shifted one bit per cycle, least significant bit first, into an 8-bit
// Byte Template shift register. A countdown counter preset to 14 tracks the
// codeword bits still to shift (MORE = counter non-zero); a count-to-8
// counter tracks the bits in the template (CONT* = template full). A full
// template is written out through the output latch with a one-cycle WR
// strobe, stalling in a wait state while the output FIFO is not ready
// (WR_RDY low). FLUSH, issued at the end of a packet, forces out a partly
// filled template; this design pads it with zero bits at the top so that
// the valid bits of the last byte are its low bits, in stream order.
//
// Controller states (S2 S1 S0): 000 reset/clear, 100 idle (BP_RDY),
// 001 shift (EN), 010 wait for WR_RDY, 011 write (WR), 110 flush.
// BP_RESET sends the controller to 000 from any state.
//
// Timing: one clock. BP is sampled in the idle state; packing a codeword
// then takes 14 shift cycles plus one cycle per byte written (15 cycles
// when one byte boundary is crossed), after which BP_RDY returns.
// packed_data is valid while WR is high. rst_n is the power-on reset.
module bit_packer
  import dce_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bp_reset,
  input  logic              bp,
  input  logic              flush,
  input  logic              wr_rdy,
  input  logic [CODE_W-1:0] codeword,
  output logic [7:0]        packed_data,
  output logic              bp_rdy,
  output logic              wr
);

  typedef enum logic [2:0] {
    BP_CLR   = 3'b000,
    BP_IDLE  = 3'b100,
    BP_SHIFT = 3'b001,
    BP_WAIT  = 3'b010,
    BP_WRITE = 3'b011,
    BP_FLUSH = 3'b110
  } bp_state_e;

  bp_state_e         state;
  logic [CODE_W-1:0] code_sr;     // codeword shift register
  logic [7:0]        template_q;  // Byte Template
  logic [7:0]        latch_q;     // output latch
  logic [3:0]        countdown;   // codeword bits left to shift
  logic [3:0]        cnt8;        // bits in the Byte Template

  logic more;
  assign more   = (countdown != 4'd0);
  assign bp_rdy = (state == BP_IDLE);
  assign wr     = (state == BP_WRITE) & wr_rdy;
  assign packed_data = wr ? template_q : latch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= BP_CLR;
      code_sr    <= '0;
      template_q <= '0;
      latch_q    <= '0;
      countdown  <= '0;
      cnt8       <= '0;
    end else if (bp_reset) begin
      state <= BP_CLR;
    end else begin
      unique case (state)
        BP_CLR: begin
          cnt8       <= '0;
          template_q <= '0;
          countdown  <= '0;
          state      <= BP_IDLE;
        end
        BP_IDLE: begin
          code_sr   <= codeword;        // BP_RDY is the parallel-load enable
          countdown <= 4'(CODE_W);      // and the countdown preset
          if (bp)         state <= BP_SHIFT;
          else if (flush) state <= BP_FLUSH;
        end
        BP_SHIFT: begin
          template_q <= {code_sr[0], template_q[7:1]};
          code_sr    <= code_sr >> 1;
          countdown  <= countdown - 4'd1;
          cnt8       <= cnt8 + 4'd1;
          if (cnt8 == 4'd7)            state <= wr_rdy ? BP_WRITE : BP_WAIT;
          else if (countdown == 4'd1)  state <= BP_IDLE;
        end
        BP_WAIT: begin
          if (wr_rdy) state <= BP_WRITE;
        end
        BP_WRITE: begin
          if (!wr_rdy) begin
            state <= BP_WAIT;           // FIFO filled up meanwhile
          end else begin
            latch_q <= template_q;
            cnt8    <= '0;
            state   <= more ? BP_SHIFT : BP_IDLE;
          end
        end
        BP_FLUSH: begin
          countdown <= '0;
          if (cnt8 == 4'd0) begin
            state <= BP_IDLE;
          end else begin
            template_q <= {1'b0, template_q[7:1]};
            cnt8       <= cnt8 + 4'd1;
            if (cnt8 == 4'd7) state <= wr_rdy ? BP_WRITE : BP_WAIT;
          end
        end
        default: state <= BP_CLR;
      endcase
    end
  end

  a_write_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
    wr |-> wr_rdy) else $error("bit_packer: WR while the FIFO is not ready");

endmodule
