// compressor_fsm -- five-state controller of the packing processor.
//
// States and transitions follow the source design's state diagram:
//   STANDBY       start_FSM=0 -> STANDBY;  start_FSM=1 -> ACUMULATE
//   ACUMULATE     -> ACTUALIZE
//   ACTUALIZE     -> DETERMINE
//   DETERMINE     bitsAcubuff_FSM=10 -> OUTPUT CHARGE, else -> STANDBY
//   OUTPUT CHARGE bitsAcucode_FSM!=0 -> ACUMULATE, else -> STANDBY
// and reset forces STANDBY. What each state asks of the datapath is this
// design's reading: STANDBY loads the waiting code when start_FSM is high
// (ctrl.load, which also pops it from the queue), ACUMULATE compares and
// latches NACUM, ACTUALIZE moves the bits, OUTPUT CHARGE sends the full
// buffer. `flag` is high for the one cycle in which SALFIN shows a new word.
//
// Timing: a code that does not fill the buffer takes 4 cycles (STANDBY,
// ACUMULATE, ACTUALIZE, DETERMINE); one that fills it exactly takes 5; each
// further 10-bit word of the same code adds 4 (ACUMULATE, ACTUALIZE,
// DETERMINE, OUTPUT CHARGE).
module compressor_fsm
  import huffman_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             start_FSM,
  input  logic [CNT_W-1:0] bitsAcubuff_FSM,
  input  logic [LEN_W-1:0] bitsAcucode_FSM,
  output dp_ctrl_t         ctrl,
  output fsm_state_t       state,
  output logic             flag
);

  fsm_state_t next;

  always_comb begin
    next = state;
    ctrl = '0;
    unique case (state)
      ST_STANDBY: begin
        if (start_FSM) begin
          ctrl.load = 1'b1;
          next      = ST_ACUMULATE;
        end
      end
      ST_ACUMULATE: begin
        ctrl.compute = 1'b1;
        next         = ST_ACTUALIZE;
      end
      ST_ACTUALIZE: begin
        ctrl.update = 1'b1;
        next        = ST_DETERMINE;
      end
      ST_DETERMINE: begin
        next = (bitsAcubuff_FSM == CNT_W'(BUF_W)) ? ST_OUTCHARGE : ST_STANDBY;
      end
      ST_OUTCHARGE: begin
        ctrl.out_charge = 1'b1;
        next = (bitsAcucode_FSM != '0) ? ST_ACUMULATE : ST_STANDBY;
      end
      default: next = ST_STANDBY;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= ST_STANDBY;
      flag  <= 1'b0;
    end else begin
      state <= next;
      flag  <= ctrl.out_charge;
    end
  end

endmodule
