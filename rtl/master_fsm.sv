// master_fsm: command decoder and write controller of the stimulator.
//
// Commands reach the chip as amplitude-shift keying of the power carrier.
// The demodulator (analog) delivers one data bit per cmd_strobe. The master
// FSM frames the bit stream, pulls out the site address, the register to
// write and the value, routes the write to the addressed site and waits for
// that site to acknowledge before it takes another command, as on the
// published chip.
//
// The frame layout is this design's choice: the line idles at 0, a 1 starts
// a frame, then 18 bits follow MSB first: 7-bit site address, 2-bit register
// select (0 amplitude, 1 duration, 2 interphase delay, 3 repetition) and a
// 9-bit value. A frame addressing a site that does not exist is dropped and
// flagged on cmd_error. Bits that arrive while a write is in progress are
// ignored (busy is high).
//
// Timing: wr_req rises the clock after the last frame bit, stays high until
// wr_ack, then falls and the FSM waits for wr_ack to fall (four-phase
// handshake); with a one-clock acknowledge a write takes four clocks.
module master_fsm
  import inis1_pkg::*;
#(
  parameter int unsigned SITES = NUM_SITES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_bit,
  input  logic               cmd_strobe,
  output logic               wr_req,
  output logic [ADDR_W-1:0]  wr_addr,
  output reg_sel_e           wr_reg,
  output logic [TIME_W-1:0]  wr_data,
  input  logic               wr_ack,
  output logic               busy,
  output logic               cmd_error,
  output logic               cmd_done
);

  typedef enum logic [1:0] {
    M_IDLE, M_SHIFT, M_WRITE, M_RELEASE
  } mstate_e;

  localparam int unsigned BCW = $clog2(CMD_W + 1);

  mstate_e          state;
  logic [CMD_W-1:0] shreg;
  logic [BCW-1:0]   nbits;
  logic [CMD_W-1:0] sh_next;
  cmd_t             cmd;

  assign sh_next = {shreg[CMD_W-2:0], cmd_bit};
  assign cmd     = cmd_t'(shreg);
  assign wr_addr = cmd.addr;
  assign wr_reg  = cmd.sel;
  assign wr_data = cmd.data;
  assign wr_req  = (state == M_WRITE);
  assign busy    = (state == M_WRITE) || (state == M_RELEASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      shreg     <= '0;
      nbits     <= '0;
      cmd_error <= 1'b0;
      cmd_done  <= 1'b0;
    end else begin
      cmd_error <= 1'b0;
      cmd_done  <= 1'b0;
      unique case (state)
        M_IDLE: if (cmd_strobe && cmd_bit) begin
          state <= M_SHIFT;
          nbits <= '0;
        end
        M_SHIFT: if (cmd_strobe) begin
          shreg <= sh_next;
          nbits <= nbits + 1'b1;
          if (nbits == BCW'(CMD_W - 1)) begin
            // the address field is complete in the shifted value
            if (int'(sh_next[CMD_W-1 -: ADDR_W]) < SITES)
              state <= M_WRITE;
            else begin
              state     <= M_IDLE;
              cmd_error <= 1'b1;
            end
          end
        end
        M_WRITE: if (wr_ack) state <= M_RELEASE;
        M_RELEASE: if (!wr_ack) begin
          state    <= M_IDLE;
          cmd_done <= 1'b1;
        end
      endcase
    end
  end

  // The command must not change while a write is requested.
  a_stable_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_req && !wr_ack) |=> $stable(shreg));

endmodule
