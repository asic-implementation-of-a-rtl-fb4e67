// tb_compressor_fsm -- checks the five-state packing controller.
//
// The testbench plays the datapath: it keeps its own fill and bits-left
// counts, updated from the FSM's control lines, and feeds them back. It
// checks every state transition against the state diagram, the control
// lines each state must raise, that flag follows OUTPUT CHARGE by one
// cycle, and the cycle counts: 4 cycles for a code that leaves the buffer
// not full, 5 for one that fills it exactly. Each transition of the
// diagram must be taken at least once.
module tb_compressor_fsm;
  import huffman_pkg::*;
  logic clk = 0, rst = 1;
  logic start_FSM;
  logic [3:0] bitsAcubuff_FSM;
  logic [4:0] bitsAcucode_FSM;
  dp_ctrl_t ctrl;
  fsm_state_t state;
  logic flag;
  int checks = 0, failures = 0;
  int seen [string];

  compressor_fsm dut (.clk, .rst, .start_FSM, .bitsAcubuff_FSM, .bitsAcucode_FSM, .ctrl, .state, .flag);

  always #10 clk = ~clk;

  int fill = 0, left = 0, mv = 0, pending_len = 0;
  logic was_out = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL %s (state %s)", s, state.name());
  endtask

  // model of the datapath and checker of each cycle
  always @(posedge clk) if (!rst) begin
    fsm_state_t exp_next;
    checks++;
    if (flag != was_out) fail("flag timing");
    was_out = (state == ST_OUTCHARGE);
    case (state)
      ST_STANDBY: begin
        if (ctrl != dp_ctrl_t'({start_FSM, 3'b000})) fail("STANDBY controls");
        exp_next = start_FSM ? ST_ACUMULATE : ST_STANDBY;
        seen[start_FSM ? "STANDBY->ACUMULATE" : "STANDBY->STANDBY"] = 1;
        if (start_FSM) left = pending_len;
      end
      ST_ACUMULATE: begin
        if (ctrl != '{load:0, compute:1, update:0, out_charge:0}) fail("ACUMULATE controls");
        exp_next = ST_ACTUALIZE;
        mv = (left < 10 - fill) ? left : 10 - fill;
      end
      ST_ACTUALIZE: begin
        if (ctrl != '{load:0, compute:0, update:1, out_charge:0}) fail("ACTUALIZE controls");
        exp_next = ST_DETERMINE;
        fill += mv; left -= mv;
      end
      ST_DETERMINE: begin
        if (ctrl != '0) fail("DETERMINE controls");
        exp_next = (fill == 10) ? ST_OUTCHARGE : ST_STANDBY;
        seen[(fill == 10) ? "DETERMINE->OUTCHARGE" : "DETERMINE->STANDBY"] = 1;
      end
      ST_OUTCHARGE: begin
        if (ctrl != '{load:0, compute:0, update:0, out_charge:1}) fail("OUTCHARGE controls");
        exp_next = (left != 0) ? ST_ACUMULATE : ST_STANDBY;
        seen[(left != 0) ? "OUTCHARGE->ACUMULATE" : "OUTCHARGE->STANDBY"] = 1;
        fill = 0;
      end
      default: begin fail("illegal state"); exp_next = ST_STANDBY; end
    endcase
    #1;
    if (state != exp_next) fail($sformatf("next state %s expected %s", state.name(), exp_next.name()));
    bitsAcubuff_FSM = 4'(fill);
    bitsAcucode_FSM = 5'(left);
  end

  initial begin
    start_FSM = 0; bitsAcubuff_FSM = 0; bitsAcucode_FSM = 0;
    #25 rst = 0;
    repeat (3) @(posedge clk);
    repeat (1500) begin
      int t0, t1, fill0;
      pending_len = ($urandom_range(7) == 0) ? 17 : int'($urandom_range(9, 1));
      @(negedge clk);
      start_FSM = 1;
      fill0 = fill;
      t0 = $time;
      @(negedge clk);
      start_FSM = 0;
      // wait until back in STANDBY
      do @(negedge clk); while (state != ST_STANDBY);
      t1 = $time;
      checks++;
      if (fill0 + pending_len < 10 && (t1 - t0) / 20 != 4) fail($sformatf("short code took %0d cycles", (t1 - t0) / 20));
      else if (fill0 + pending_len == 10 && (t1 - t0) / 20 != 5) fail($sformatf("filling code took %0d cycles", (t1 - t0) / 20));
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
    end
    begin
      string names[6] = '{"STANDBY->STANDBY", "STANDBY->ACUMULATE", "DETERMINE->OUTCHARGE",
                          "DETERMINE->STANDBY", "OUTCHARGE->ACUMULATE", "OUTCHARGE->STANDBY"};
      foreach (names[i]) begin
        checks++;
        if (!seen.exists(names[i])) fail({"transition never taken: ", names[i]});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
