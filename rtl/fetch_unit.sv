// Fetch stage: the load unit that reads instructions over a Wishbone bus.
//
// A request goes out combinationally in the cycle PC Gen offers a valid PC
// and the stage's two-entry instruction buffer holds fewer than two entries;
// PC Gen then steps on (pf_advance). Room is judged from the buffer count
// alone, not from whether Decode pops this cycle: Decode's stall depends on
// the data bus answer, which passes through the bus arbiter that looks at this
// request, so using it here would close a combinational loop. A request not answered in its first cycle
// is held, with its address latched, until the slave gives ack (or err,
// treated like ack), as classic Wishbone requires. With a slave that answers
// in the same cycle the stage fetches one instruction per cycle; with one
// that answers a cycle later, one every two cycles. Answers are queued in the
// buffer, whose head is the instruction in Decode; Decode pops it when it is
// not stalled. A flush (taken branch) empties the buffer and marks a request
// still in flight to be thrown away when it completes, so a bus cycle is never
// cut short. next_insn is the instruction Decode will hold in the next cycle,
// which addresses the register file's synchronous read ports.
//
// Follows the original: a load unit in Fetch that reads instructions over the
// Wishbone instruction port and is flushed by a taken branch. The request/hold
// logic and the two-entry buffer are this design's own.
module fetch_unit (
  input  logic        clk,
  input  logic        rst,
  // from PC Gen
  input  logic [31:0] pf_pc,
  input  logic        pf_valid,
  output logic        pf_advance,
  // control
  input  logic        flush,
  input  logic        d_stall,     // decode cannot take an instruction
  // instruction bus
  output logic [29:0] ibus_adr,
  output logic        ibus_cyc,
  output logic        ibus_stb,
  input  logic [31:0] ibus_dat_r,
  input  logic        ibus_ack,
  input  logic        ibus_err,
  // to decode
  output logic        f_valid,
  output logic [31:0] f_pc,
  output logic [31:0] f_insn,
  output logic [31:0] next_insn
);
  logic        hold, discard;
  logic [31:0] req_pc, cur_pc;
  logic        new_req, done, consume, push;
  logic [1:0]  count;
  logic [31:0] buf_insn [2];
  logic [31:0] buf_pc   [2];
  logic [1:0]  left;       // entries left after this cycle's pop

  assign consume = f_valid && !d_stall;
  assign left    = count - {1'b0, consume};
  assign new_req = !hold && pf_valid && !flush && count < 2'd2;
  assign ibus_stb = hold || new_req;
  assign ibus_cyc = ibus_stb;
  assign cur_pc   = hold ? req_pc : pf_pc;
  assign ibus_adr = cur_pc[31:2];
  assign done     = ibus_stb && (ibus_ack || ibus_err);
  assign push     = done && !discard && !flush;
  assign pf_advance = new_req;

  assign f_valid = (count != 2'd0);
  assign f_insn  = buf_insn[0];
  assign f_pc    = buf_pc[0];

  always_comb begin
    if (left == 2'd0)  next_insn = ibus_dat_r;
    else if (consume)  next_insn = buf_insn[1];
    else               next_insn = buf_insn[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hold    <= 1'b0;
      discard <= 1'b0;
      req_pc  <= '0;
      count   <= '0;
      for (int i = 0; i < 2; i++) begin
        buf_insn[i] <= '0;
        buf_pc[i]   <= '0;
      end
    end else begin
      // outstanding request bookkeeping
      if (done) begin
        hold    <= 1'b0;
        discard <= 1'b0;
      end else if (new_req) begin
        hold   <= 1'b1;
        req_pc <= pf_pc;
      end
      if (flush && hold && !done) discard <= 1'b1;

      // instruction buffer
      if (flush) begin
        count <= '0;
      end else begin
        if (consume) begin
          buf_insn[0] <= buf_insn[1];
          buf_pc[0]   <= buf_pc[1];
        end
        if (push) begin
          buf_insn[left[0]] <= ibus_dat_r;
          buf_pc[left[0]]   <= cur_pc;
        end
        count <= left + {1'b0, push};
      end
    end
  end

  // Wishbone master rule: a request stays up, unchanged, until answered.
  property p_hold_request;
    @(posedge clk) disable iff (rst) (ibus_stb && !ibus_ack && !ibus_err) |=> (ibus_stb && $stable(ibus_adr));
  endproperty
  assert property (p_hold_request);
  // The buffer never overflows.
  assert property (@(posedge clk) disable iff (rst) !(push && left == 2'd2));
endmodule
