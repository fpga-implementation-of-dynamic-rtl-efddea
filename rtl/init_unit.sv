// init_unit: SDRAM initialisation unit.
//
// After reset it holds the SDRAM bus with NOPs for T_INIT cycles (power-up
// wait, 200 us at 100 MHz), then issues PRECHARGE ALL, two AUTO REFRESH
// commands each followed by tRFC, and a MODE REGISTER SET that programs
// burst length 1, sequential bursts and CAS latency CL, waits tMRD and
// raises done. Until done is high the controller's own command paths stay
// idle and this block drives the bus. The document only names the unit; the
// sequence is the usual JEDEC SDRAM power-up sequence, chosen by this design.
//
// Interface: bus is registered; done stays high until the next reset.
module init_unit
  import memctrl_pkg::*;
#(
  parameter int unsigned T_INIT = 20000,
  parameter int unsigned T_RP   = 2,
  parameter int unsigned T_RFC  = 7,
  parameter int unsigned T_MRD  = 2,
  parameter int unsigned CL     = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  output sdram_bus_t bus,
  output logic       done
);
  typedef enum logic [2:0] {I_WAIT, I_PREA, I_REF1, I_REF2, I_MRS, I_MRD, I_DONE} istate_e;

  localparam int unsigned CW = $clog2(T_INIT + T_RP + T_RFC + T_MRD + 1);

  // mode register: a[2:0] burst length 1, a[3] sequential, a[6:4] CAS latency
  localparam logic [ROW_W-1:0] MODE_WORD = ROW_W'((CL & 7) << 4);

  istate_e       state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= I_WAIT;
      cnt     <= CW'(T_INIT - 1);
      bus     <= SDRAM_BUS_IDLE;
      bus.cke <= 1'b0;
      done    <= 1'b0;
    end else begin
      bus.cmd <= CMD_NOP;
      bus.a   <= '0;
      bus.ba  <= '0;
      if (cnt != '0) cnt <= cnt - 1'b1;
      unique case (state)
        I_WAIT: begin
          bus.cke <= 1'b1;
          if (cnt == '0) begin
            bus.cmd   <= CMD_PRE;
            bus.a[10] <= 1'b1;
            cnt       <= CW'(T_RP - 1);
            state     <= I_PREA;
          end
        end
        I_PREA: if (cnt == '0) begin
          bus.cmd <= CMD_REF;
          cnt     <= CW'(T_RFC - 1);
          state   <= I_REF1;
        end
        I_REF1: if (cnt == '0) begin
          bus.cmd <= CMD_REF;
          cnt     <= CW'(T_RFC - 1);
          state   <= I_REF2;
        end
        I_REF2: if (cnt == '0) begin
          bus.cmd <= CMD_MRS;
          bus.a   <= MODE_WORD;
          cnt     <= CW'(T_MRD - 1);
          state   <= I_MRS;
        end
        I_MRS: if (cnt == '0) state <= I_MRD;
        I_MRD: begin
          done  <= 1'b1;
          state <= I_DONE;
        end
        I_DONE: ;
        default: state <= I_WAIT;
      endcase
    end
  end
endmodule
