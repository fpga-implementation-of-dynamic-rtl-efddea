// auto_refresh_gen: auto refresh generator.
//
// When the final burst selection grants a refresh, this block closes any open
// bank with a PRECHARGE ALL (a[10] = 1), waits tRP, issues AUTO REFRESH and
// then holds the command path for tRFC, the refresh cycle time of the SDRAM,
// before it reports idle again. ref_done pulses in the cycle the AUTO REFRESH
// command is registered, which takes one refresh off the backlog; close_all
// pulses with the PRECHARGE ALL so the command generator forgets its open
// rows. Both the precharge-all and a refresh without one wait for pre_ok
// from the command generator (tRAS and write recovery met, no bank still
// auto-precharging). Issuing refresh and waiting tRFC are the document's; the
// precharge-all step and the timing values (100 MHz assumed) are this
// design's.
//
// Interface: grant is honoured only while busy is low. Bus outputs are
// registered; drive_bus says when this block owns the SDRAM bus.
module auto_refresh_gen
  import memctrl_pkg::*;
#(
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RFC = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       grant,
  input  logic       any_open,
  input  logic       pre_ok,     // precharge allowed (tRAS, tWR met)
  output logic       busy,
  output logic       drive_bus,
  output sdram_bus_t bus,
  output logic       ref_done,
  output logic       close_all
);
  typedef enum logic [2:0] {R_IDLE, R_WAIT, R_TRP, R_REF, R_TRFC} rstate_e;

  localparam int unsigned CW = $clog2(T_RFC + T_RP + 2);

  rstate_e       state;
  logic [CW-1:0] cnt;

  assign busy = (state != R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      cnt       <= '0;
      bus       <= SDRAM_BUS_IDLE;
      drive_bus <= 1'b0;
      ref_done  <= 1'b0;
      close_all <= 1'b0;
    end else begin
      bus.cmd   <= CMD_NOP;
      bus.a     <= '0;
      ref_done  <= 1'b0;
      close_all <= 1'b0;
      if (cnt != '0) cnt <= cnt - 1'b1;
      unique case (state)
        R_IDLE: begin
          drive_bus <= 1'b0;
          if (grant) begin
            drive_bus <= 1'b1;
            if (!pre_ok) begin
              state <= R_WAIT;
            end else if (any_open) begin
              bus.cmd   <= CMD_PRE;
              bus.a[10] <= 1'b1;
              close_all <= 1'b1;
              cnt       <= CW'(T_RP - 1);
              state     <= R_TRP;
            end else begin
              state <= R_REF;
            end
          end
        end
        R_WAIT: if (pre_ok && any_open) begin
          bus.cmd   <= CMD_PRE;
          bus.a[10] <= 1'b1;
          close_all <= 1'b1;
          cnt       <= CW'(T_RP - 1);
          state     <= R_TRP;
        end else if (pre_ok) begin
          state <= R_REF;
        end
        R_TRP:  if (cnt == '0) state <= R_REF;
        R_REF: begin
          bus.cmd  <= CMD_REF;
          ref_done <= 1'b1;
          cnt      <= CW'(T_RFC - 1);
          state    <= R_TRFC;
        end
        R_TRFC: if (cnt == '0) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
