// offline_sequencer: the state machine that runs an off-line test.
//
// The host loads a start word address and a vector count and starts the
// run. For each vector the sequencer reads four words of the test vector
// memory into the level-1 registers (pin values low/high, pin directions
// low/high), moves level 1 to level 2 (which also starts the latch delay),
// then writes the two level-3 words back into the next two memory words.
// One vector thus occupies six consecutive words. The address counter
// steps after every memory access; the length counter steps down once per
// vector, and when it reaches zero the done bit is set. In loop mode the
// counters are reloaded instead and the same vectors run again until stop.
//
// Each memory access takes two bus clocks (an address cycle, then the cycle
// in which the data is used or written), so a vector takes 8 + 1 + 4 = 13
// states, 1.3 us at a 10 MHz bus clock, about 770K vectors per second. The
// count of 13 states and the resulting rate are the original's; the split
// into these particular states is this design's. When the coarse latch
// delay is longer than zero, the first write-back state waits for the
// latch (l3_valid), adding one bus clock per unit of delay.
// stop ends the run after the vector in progress; done is then set too.
module offline_sequencer
  import mactester_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  input  logic              loop_en,
  input  logic [MEM_AW-1:0] start_addr,
  input  logic [LEN_W-1:0]  length,
  input  logic              l3_valid,
  output bus_ctrl_t         ctrl,
  output logic              active,
  output logic              done,
  output logic [MEM_AW-1:0] cur_addr,
  output logic [LEN_W-1:0]  remaining
);
  typedef enum logic [3:0] {
    S_IDLE,
    S_RA0, S_RD0, S_RA1, S_RD1, S_RA2, S_RD2, S_RA3, S_RD3,
    S_XFER,
    S_WA0, S_WD0, S_WA1, S_WD1
  } state_e;

  state_e state;
  logic   stop_req;
  logic   last_vec;

  assign last_vec = (remaining == LEN_W'(1));
  assign active   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_addr  <= '0;
      remaining <= '0;
      done      <= 1'b0;
      stop_req  <= 1'b0;
    end else begin
      if (stop && active) stop_req <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            cur_addr  <= start_addr;
            remaining <= length;
            done      <= (length == '0);
            stop_req  <= 1'b0;
            if (length != '0) state <= S_RA0;
          end
        end
        S_RD0, S_RD1, S_RD2, S_RD3, S_WD1: begin
          cur_addr <= cur_addr + 1'b1;
          state    <= state_e'(state + 1'b1);
          if (state == S_WD1) begin
            remaining <= remaining - 1'b1;
            state     <= S_RA0;
            if (last_vec || stop_req) begin
              done <= 1'b1;
              if (loop_en && !stop_req && !stop) begin
                cur_addr  <= start_addr;
                remaining <= length;
              end else begin
                state <= S_IDLE;
              end
            end
          end
        end
        S_WD0: begin
          if (l3_valid) begin
            cur_addr <= cur_addr + 1'b1;
            state    <= S_WA1;
          end
        end
        default: state <= state_e'(state + 1'b1);
      endcase
    end
  end

  always_comb begin
    ctrl          = BUS_CTRL_IDLE;
    ctrl.mem_addr = cur_addr;
    ctrl.half     = 2'b11;
    unique case (state)
      S_RA0, S_RA1, S_RA2, S_RA3: ctrl.src = BUS_MEM;
      S_RD0: begin ctrl.src = BUS_MEM; ctrl.l1_we[L1_VAL_LO] = 1'b1; end
      S_RD1: begin ctrl.src = BUS_MEM; ctrl.l1_we[L1_VAL_HI] = 1'b1; end
      S_RD2: begin ctrl.src = BUS_MEM; ctrl.l1_we[L1_DIR_LO] = 1'b1; end
      S_RD3: begin ctrl.src = BUS_MEM; ctrl.l1_we[L1_DIR_HI] = 1'b1; end
      S_XFER: ctrl.xfer = 1'b1;
      S_WA0: begin ctrl.src = BUS_L3; ctrl.l3_sel = 1'b0; end
      S_WD0: begin ctrl.src = BUS_L3; ctrl.l3_sel = 1'b0; ctrl.mem_we = l3_valid; end
      S_WA1: begin ctrl.src = BUS_L3; ctrl.l3_sel = 1'b1; end
      S_WD1: begin ctrl.src = BUS_L3; ctrl.l3_sel = 1'b1; ctrl.mem_we = 1'b1; end
      default: ;
    endcase
  end
endmodule
