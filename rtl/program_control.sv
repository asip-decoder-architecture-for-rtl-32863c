// program_control: instruction fetch, zero-overhead loops and halt.
//
// After `start` the unit fetches from address 0 and issues one instruction
// per clock: a VLIW word goes to the datapath (`vliw_valid`), a control word
// to the address generation unit (`ctrl_valid`). The instruction memory is
// read synchronously, so the read address is the next program counter.
// LOOP (count a, last body address b) runs the following instructions up to
// and including address b `a` times, without cycles spent on the loop
// itself. Loops nest two deep; an inner loop must not end on the same address
// as the loop around it. HALT stops issue and sets `halted` until the next
// start.
// The published design only names the program control; this loop scheme and
// the start/halt handshake are this design's own.
module program_control
  import dec_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [IA-1:0] imem_raddr,
  input  logic [IW-1:0] imem_rdata,
  output logic          vliw_valid,
  output vliw_t         vliw,
  output logic          ctrl_valid,
  output ctrl_t         ctrl,
  output logic          running,
  output logic          halted
);

  logic [IA-1:0] pc_q, pc_nxt;
  logic [IA-1:0] ls_start [2];
  logic [IA-1:0] ls_end   [2];
  logic [15:0]   ls_cnt   [2];
  logic [1:0]    sp;
  logic          is_ctrl, is_halt, is_loop, at_end;

  assign vliw    = vliw_t'(imem_rdata);
  assign ctrl    = ctrl_t'(imem_rdata);
  assign is_ctrl = imem_rdata[IW-1];
  assign is_halt = running && is_ctrl && ctrl.op == C_HALT;
  assign is_loop = running && is_ctrl && ctrl.op == C_LOOP;
  assign at_end  = (sp != 0) && (pc_q == ls_end[sp-1]);

  assign vliw_valid = running && !is_ctrl;
  assign ctrl_valid = running && is_ctrl;

  always_comb begin
    if (!running)                         pc_nxt = '0;
    else if (!is_loop && at_end && ls_cnt[sp-1] > 1) pc_nxt = ls_start[sp-1];
    else                                  pc_nxt = pc_q + 1'b1;
  end
  assign imem_raddr = pc_nxt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      halted  <= 1'b0;
      pc_q    <= '0;
      sp      <= '0;
      for (int i = 0; i < 2; i++) begin
        ls_start[i] <= '0;
        ls_end[i]   <= '0;
        ls_cnt[i]   <= '0;
      end
    end else begin
      pc_q <= pc_nxt;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          halted  <= 1'b0;
          sp      <= '0;
        end
      end else if (is_halt) begin
        running <= 1'b0;
        halted  <= 1'b1;
      end else if (is_loop) begin
        ls_start[sp[0]] <= pc_q + 1'b1;
        ls_end[sp[0]]   <= IA'(ctrl.b);
        ls_cnt[sp[0]]   <= ctrl.a;
        sp              <= sp + 1'b1;
      end else if (at_end) begin
        if (ls_cnt[sp-1] > 1) ls_cnt[sp-1] <= ls_cnt[sp-1] - 1'b1;
        else                  sp <= sp - 1'b1;
      end
    end
  end

  a_loop_depth: assert property (@(posedge clk) disable iff (!rst_n) is_loop |-> sp < 2);
  a_loop_ends:  assert property (@(posedge clk) disable iff (!rst_n)
    (at_end && ls_cnt[sp-1] <= 1 && sp == 2) |-> pc_q != ls_end[0]);

endmodule
