// xadc_handler: reads both channels of a dual-ADC converter over its dynamic
// reconfiguration port (DRP) and decimates the sample stream.
//
// The converter runs two ADCs in lock step in continuous simultaneous-sampling mode and
// pulses end-of-conversion (eoc) when both status registers hold a new result. This FSM
// then reads the channel A status register (auxiliary input 3, DRP address 0x13) and the
// channel B one (auxiliary input 11, address 0x1B): address + one-cycle den strobe, wait
// for drdy, take do[15:4] as the 12-bit offset-binary sample. After both reads it either
// forwards the pair (sample_valid for one clock) or drops it: one pair is kept, then
// skip_count(timescale) pairs are skipped, giving fs/(N+1) for N = 0, 10, 100, 1000,
// 10000. The channel addresses, the read order and the decimation table follow the design
// description; the converter itself is outside this module.
//
// States: IDLE -(eoc, strobe A)-> WAIT_A -(drdy)-> REQ_B -> WAIT_B -(drdy)-> EMIT -> IDLE.
// A read takes 2 clocks plus the DRP latency per channel.
module xadc_handler
  import dso_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  timescale,
  // DRP of the converter
  output logic [6:0]  drp_addr,
  output logic        drp_en,
  input  logic [15:0] drp_do,
  input  logic        drp_ready,
  input  logic        eoc,
  // decimated sample pairs
  output sample_t     sample_a,
  output sample_t     sample_b,
  output logic        sample_valid
);
  localparam logic [6:0] ADDR_CH_A = 7'h13;
  localparam logic [6:0] ADDR_CH_B = 7'h1B;

  typedef enum logic [2:0] {IDLE, WAIT_A, REQ_B, WAIT_B, EMIT} state_t;
  state_t state;

  sample_t a_hold, b_hold;
  logic [15:0] skipped;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      drp_addr <= ADDR_CH_A;
      drp_en <= 1'b0;
      a_hold <= '0;
      b_hold <= '0;
      sample_a <= '0;
      sample_b <= '0;
      sample_valid <= 1'b0;
      skipped <= '0;
    end else begin
      drp_en <= 1'b0;
      sample_valid <= 1'b0;
      case (state)
        IDLE: if (eoc) begin
          drp_addr <= ADDR_CH_A;
          drp_en <= 1'b1;
          state <= WAIT_A;
        end
        WAIT_A: if (drp_ready) begin
          a_hold <= drp_do[15:4];
          state <= REQ_B;
        end
        REQ_B: begin
          drp_addr <= ADDR_CH_B;
          drp_en <= 1'b1;
          state <= WAIT_B;
        end
        WAIT_B: if (drp_ready) begin
          b_hold <= drp_do[15:4];
          state <= EMIT;
        end
        EMIT: begin
          if (skipped >= skip_count(timescale)) begin
            sample_a <= a_hold;
            sample_b <= b_hold;
            sample_valid <= 1'b1;
            skipped <= '0;
          end else begin
            skipped <= skipped + 16'd1;
          end
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
