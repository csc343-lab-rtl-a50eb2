// lcd_connector: shows a 4-bit value as one hexadecimal character ('0'..'9',
// 'A'..'F') in the first position of an HD44780-style character LCD with an
// 8-bit bus.
//
// After reset it waits T_POWERUP_US for the display to power up, then sends
// four instructions: function set 0x38 (8-bit bus, two lines, 5x8 font),
// display on 0x0C (cursor off), clear 0x01 and entry mode 0x06. It then writes
// "set address 0" (0x80) followed by the ASCII character of value, and goes
// idle. Whenever value differs from the character last written, the address
// and character are written again.
//
// Bus cycles. A write cycle sets RS, R/W = 0 and the byte, raises E, lowers
// it, and holds RS and the byte. A read cycle (RS = 0, R/W = 1, bus released
// with lcd_data_oe = 0) reads the busy flag, DB7, on the clock edge that lowers
// E; DB6..DB0 (the display's address counter) are not used. Both kinds of
// cycle use these limits, converted to clocks of CLK_HZ and rounded up:
//   address set-up RS, R/W -> E rise  tAS   >= 40 ns   (T_AS_NS)
//   E high pulse width                PWEH  >= 230 ns  (T_PWEH_NS)
//   data set-up before E fall         tDSW  >= 80 ns   (met: data is set up with RS)
//   address and data hold after E     tAH, tH >= 10 ns (T_H_NS)
//   E cycle time                      tcycE >= 500 ns  (T_CYCE_NS)
//   read data valid after E rise      tDDR  <= 160 ns  (T_DDR_NS, E is kept
//                                                       high at least this long)
//
// Waiting for an instruction. After each byte (except during power-up) the
// controller polls the busy flag with read cycles, one every tcycE, and moves
// on as soon as it reads 0. The usual execution time (T_EXEC_US, or T_CLEAR_US
// after the clear) bounds the wait: when it runs out the controller moves on
// without a clear flag, so a display whose bus cannot be read still works.
// With BUSY_POLL = 0 no read cycles are made and R/W stays 0.
//
// The bus signals and their timing follow the display's data sheet; the
// instruction codes, the waits, the polling scheme and what is shown are this
// design's choices. ready is 1 while the controller is idle with value shown.
module lcd_connector
  import regfile_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 48_000_000,
  parameter int unsigned T_AS_NS      = 40,
  parameter int unsigned T_PWEH_NS    = 230,
  parameter int unsigned T_H_NS       = 10,
  parameter int unsigned T_CYCE_NS    = 500,
  parameter int unsigned T_DDR_NS     = 160,
  parameter int unsigned T_EXEC_US    = 50,
  parameter int unsigned T_CLEAR_US   = 2_000,
  parameter int unsigned T_POWERUP_US = 20_000,
  parameter bit          BUSY_POLL    = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  data_t      value,
  output logic       lcd_e,
  output logic       lcd_rw,
  output logic       lcd_rs,
  output logic [7:0] lcd_data,     // DB0..DB7 driven by this controller
  output logic       lcd_data_oe,  // 1: drive DB0..DB7, 0: the display drives
  input  logic [7:0] lcd_data_in,  // DB0..DB7 as seen on the pins
  output logic       ready
);
  // clocks needed to cover a time, at least one
  function automatic int unsigned cycles_ns(longint unsigned t_ns);
    longint unsigned c;
    c = (t_ns * longint'(CLK_HZ) + 64'd999_999_999) / 64'd1_000_000_000;
    return (c < 1) ? 1 : int'(c);
  endfunction

  localparam int unsigned CycAs       = cycles_ns(longint'(T_AS_NS));
  localparam int unsigned CycPwW      = cycles_ns(longint'(T_PWEH_NS));
  localparam int unsigned CycDdr      = cycles_ns(longint'(T_DDR_NS));
  // E width: also long enough for read data to be valid when E falls
  localparam int unsigned CycPw       = (CycDdr > CycPwW) ? CycDdr : CycPwW;
  localparam int unsigned CycH        = cycles_ns(longint'(T_H_NS));
  localparam int unsigned CycCyc      = cycles_ns(longint'(T_CYCE_NS));
  // idle clocks after a hold so that E rises are at least tcycE apart
  localparam int unsigned CycGap      = (CycCyc > CycAs + CycPw + CycH)
                                        ? CycCyc - CycAs - CycPw - CycH : 1;
  localparam int unsigned CycExec     = cycles_ns(longint'(T_EXEC_US) * 1000);
  localparam int unsigned CycClear    = cycles_ns(longint'(T_CLEAR_US) * 1000);
  localparam int unsigned CycPowerup  = cycles_ns(longint'(T_POWERUP_US) * 1000);

  typedef enum logic [2:0] {
    S_POWERUP,  // fixed wait after reset
    S_LOAD,     // put RS, R/W and the next byte (or a read) on the bus
    S_SETUP,    // tAS before E rises
    S_PULSE,    // E high
    S_HOLD,     // E low, address and data held
    S_WAIT,     // waiting for the display to finish an instruction
    S_IDLE
  } state_t;
  typedef enum logic [2:0] {
    B_FUNC, B_DISP, B_CLEAR, B_ENTRY, B_ADDR, B_CHAR
  } step_t;

  state_t      state;
  step_t       step;
  logic        reading;    // the bus cycle in progress is a busy-flag read
  logic        done;       // the display reported not busy
  logic [31:0] wait_cnt;   // bound on the instruction wait, and power-up
  logic [7:0]  bus_cnt;    // clocks left in the current bus phase
  data_t       shown;      // value being (or last) written

  function automatic logic [7:0] hex_ascii(data_t v);
    return (v < 4'd10) ? 8'h30 + 8'(v) : 8'h41 + 8'(v) - 8'd10;
  endfunction

  // byte and register select of the current step
  logic [7:0] step_byte;
  logic       step_rs;
  always_comb begin
    step_rs = 1'b0;
    unique case (step)
      B_FUNC:  step_byte = 8'h38;
      B_DISP:  step_byte = 8'h0C;
      B_CLEAR: step_byte = 8'h01;
      B_ENTRY: step_byte = 8'h06;
      B_ADDR:  step_byte = 8'h80;
      default: begin
        step_byte = hex_ascii(shown);
        step_rs   = 1'b1;
      end
    endcase
  end

  assign ready = (state == S_IDLE) && (value == shown);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_POWERUP;
      step        <= B_FUNC;
      reading     <= 1'b0;
      done        <= 1'b0;
      wait_cnt    <= 32'(CycPowerup - 1);
      bus_cnt     <= '0;
      shown       <= '0;
      lcd_e       <= 1'b0;
      lcd_rw      <= 1'b0;
      lcd_rs      <= 1'b0;
      lcd_data    <= 8'h00;
      lcd_data_oe <= 1'b1;
    end else begin
      if (state == S_WAIT || reading) begin
        if (wait_cnt != 0) wait_cnt <= wait_cnt - 1;
      end
      unique case (state)
        S_POWERUP: begin
          if (wait_cnt == 0) state <= S_LOAD;
          else               wait_cnt <= wait_cnt - 1;
        end
        S_LOAD: begin  // write cycle: RS, R/W = 0 and the byte, E still low
          state       <= S_SETUP;
          bus_cnt     <= 8'(CycAs - 1);
          reading     <= 1'b0;
          lcd_rs      <= step_rs;
          lcd_rw      <= 1'b0;
          lcd_data    <= step_byte;
          lcd_data_oe <= 1'b1;
        end
        S_SETUP: begin
          if (bus_cnt == 0) begin
            state   <= S_PULSE;
            bus_cnt <= 8'(CycPw - 1);
            lcd_e   <= 1'b1;
          end else begin
            bus_cnt <= bus_cnt - 1;
          end
        end
        S_PULSE: begin
          if (bus_cnt == 0) begin
            state   <= S_HOLD;
            bus_cnt <= 8'(CycH - 1);
            lcd_e   <= 1'b0;
            if (reading) done <= ~lcd_data_in[7];
          end else begin
            bus_cnt <= bus_cnt - 1;
          end
        end
        S_HOLD: begin
          if (bus_cnt == 0) begin
            state   <= S_WAIT;
            bus_cnt <= 8'(CycGap - 1);
            if (!reading) begin
              done     <= 1'b0;
              wait_cnt <= (step == B_CLEAR) ? 32'(CycClear - 1) : 32'(CycExec - 1);
            end
          end else begin
            bus_cnt <= bus_cnt - 1;
          end
        end
        S_WAIT: begin
          if (bus_cnt != 0) begin
            bus_cnt <= bus_cnt - 1;
          end else if (done || wait_cnt == 0) begin
            reading <= 1'b0;
            if (step == B_CHAR) begin
              state <= S_IDLE;
            end else begin
              if (step == B_ENTRY) shown <= value;
              step  <= step_t'(step + 1'b1);
              state <= S_LOAD;
            end
          end else if (BUSY_POLL) begin  // read cycle: RS = 0, R/W = 1, bus released
            state       <= S_SETUP;
            bus_cnt     <= 8'(CycAs - 1);
            reading     <= 1'b1;
            lcd_rs      <= 1'b0;
            lcd_rw      <= 1'b1;
            lcd_data_oe <= 1'b0;
          end
        end
        default: begin  // S_IDLE
          if (value != shown) begin
            shown <= value;
            step  <= B_ADDR;
            state <= S_LOAD;
          end
        end
      endcase
    end
  end
endmodule
