// lcd_ctrl: driver for an HD44780-based 16x2 character LCD on its 8-bit
// parallel bus, showing the characters the UART receives.
//
// After reset it waits for the display's power-up time, then sends the
// initialisation commands: function set 0x38 (8-bit bus, two lines, 5x8
// font), display on 0x0C (no cursor), clear 0x01 and entry mode 0x06
// (increment, no shift). It then offers `in_ready`; a character presented
// with `in_valid` is taken on a clock where both are high and written to the
// display data RAM (RS = 1). The controller counts the 32 positions: after
// the 16th character it moves the cursor to the start of line 2 (0xC0), after
// the 32nd back to the start of line 1 (0x80), overwriting what was there.
//
// Every bus write is the same three-phase cycle: RS and DB are set with E
// low for one clock, E is held high for at least 250 ns, then E falls (the
// display latches on the falling edge) and the controller waits the
// command's execution time with RS and DB held: 40 us for a write, 1.64 ms
// for clear. R/W is always 0 (write only, the busy flag is not read), so all
// waits are timed from CLK_HZ.
//
// Only the block's purpose (received keyboard characters shown on the LCD)
// is that of the original application; the command set and times come from
// the HD44780 data sheet, and the line handling is this design's choice.
module lcd_ctrl #(
  parameter int unsigned CLK_HZ      = 10_000_000,
  parameter int unsigned POWERUP_US  = 15_000,
  parameter int unsigned CMD_US      = 40,
  parameter int unsigned CLEAR_US    = 1_640
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_db
);

  // Clock counts derived from CLK_HZ (rounded up, at least one clock).
  function automatic int unsigned cycles_us(input int unsigned us);
    longint unsigned c;
    c = (longint'(us) * longint'(CLK_HZ) + 64'd999_999) / 64'd1_000_000;
    return (c == 0) ? 1 : int'(c);
  endfunction

  localparam int unsigned T_PWR   = cycles_us(POWERUP_US);
  localparam int unsigned T_CMD   = cycles_us(CMD_US);
  localparam int unsigned T_CLEAR = cycles_us(CLEAR_US);
  localparam int unsigned T_EHIGH = (CLK_HZ + 3_999_999) / 4_000_000;  // >= 250 ns

  localparam logic [7:0] CMD_FUNC_SET = 8'h38;
  localparam logic [7:0] CMD_DISP_ON  = 8'h0C;
  localparam logic [7:0] CMD_CLEAR    = 8'h01;
  localparam logic [7:0] CMD_ENTRY    = 8'h06;
  localparam logic [7:0] CMD_LINE1    = 8'h80;
  localparam logic [7:0] CMD_LINE2    = 8'hC0;
  localparam int unsigned N_INIT      = 4;

  typedef enum logic [2:0] {
    ST_PWR, ST_NEXT, ST_SETUP, ST_EHIGH, ST_WAIT, ST_IDLE
  } state_t;

  state_t      state;
  logic [31:0] timer, wait_len;
  logic [2:0]  init_idx;
  logic [4:0]  pos;
  logic        addr_pending;
  logic [7:0]  addr_cmd;
  logic [7:0]  init_cmd;

  always_comb begin
    unique case (init_idx)
      3'd0:    init_cmd = CMD_FUNC_SET;
      3'd1:    init_cmd = CMD_DISP_ON;
      3'd2:    init_cmd = CMD_CLEAR;
      default: init_cmd = CMD_ENTRY;
    endcase
  end

  assign in_ready = (state == ST_IDLE);
  assign lcd_rw   = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_PWR;
      timer        <= 32'(T_PWR);
      wait_len     <= '0;
      init_idx     <= '0;
      pos          <= '0;
      addr_pending <= 1'b0;
      addr_cmd     <= CMD_LINE1;
      lcd_rs       <= 1'b0;
      lcd_e        <= 1'b0;
      lcd_db       <= '0;
    end else begin
      unique case (state)
        ST_PWR: begin
          if (timer <= 1) state <= ST_NEXT;
          else            timer <= timer - 1;
        end
        // Pick the next bus write: an init command, a cursor move, or wait.
        ST_NEXT: begin
          if (init_idx < 3'(N_INIT)) begin
            lcd_rs   <= 1'b0;
            lcd_db   <= init_cmd;
            wait_len <= (init_cmd == CMD_CLEAR) ? 32'(T_CLEAR) : 32'(T_CMD);
            init_idx <= init_idx + 1'b1;
            state    <= ST_SETUP;
          end else if (addr_pending) begin
            lcd_rs       <= 1'b0;
            lcd_db       <= addr_cmd;
            wait_len     <= 32'(T_CMD);
            addr_pending <= 1'b0;
            state        <= ST_SETUP;
          end else begin
            state <= ST_IDLE;
          end
        end
        ST_IDLE: begin
          if (in_valid) begin
            lcd_rs   <= 1'b1;
            lcd_db   <= in_data;
            wait_len <= 32'(T_CMD);
            pos      <= pos + 1'b1;
            if (pos == 5'd15) begin
              addr_pending <= 1'b1;
              addr_cmd     <= CMD_LINE2;
            end else if (pos == 5'd31) begin
              addr_pending <= 1'b1;
              addr_cmd     <= CMD_LINE1;
            end
            state <= ST_SETUP;
          end
        end
        ST_SETUP: begin
          lcd_e <= 1'b1;
          timer <= 32'(T_EHIGH);
          state <= ST_EHIGH;
        end
        ST_EHIGH: begin
          if (timer <= 1) begin
            lcd_e <= 1'b0;
            timer <= wait_len;
            state <= ST_WAIT;
          end else begin
            timer <= timer - 1;
          end
        end
        ST_WAIT: begin
          if (timer <= 1) state <= ST_NEXT;
          else            timer <= timer - 1;
        end
        default: state <= ST_PWR;
      endcase
    end
  end

endmodule
