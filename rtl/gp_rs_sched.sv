// gp_rs_sched: reservation stations and instruction scheduler of one PE.
//
// There is one reservation-station slot per thread ID. Each slot holds the
// instruction the map loaded for that thread and three operand registers with
// presence bits. As the paper describes, an instruction becomes ready as
// soon as every operand it needs is present, and when several are ready in the
// same cycle one of them is picked at random. Here "random" is a 16-bit LFSR
// that sets where a round-robin search over the slots starts (own choice).
//
// Each instruction fires once per frame: issuing sets its fired bit. frame_clr
// clears presence and fired bits of every slot and invalidates the loaded
// instructions (start of a new emulated cycle); loading a slot clears that slot.
// Because nothing of the old frame can fire after frame_clr, a packet still in
// flight at that moment dies in the slot it lands in, and the map can be loaded
// at once without waiting for the mesh to empty. Operands whose `need` bit is
// clear take the sign-extended immediate. Issue is combinational from the
// registered state, so an operand written at one clock edge can issue in the
// very next cycle.
//
// Interface: load_* from the map memory, wr_* from the input router, issue_*
// to the ALU and output router (issue_valid is a one-cycle strobe).
module gp_rs_sched
  import gp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   frame_clr,
  input  logic   load_en,
  input  logic [TID_W-1:0] load_slot,
  input  instr_t load_instr,
  input  logic  [THREADS-1:0][2:0] wr_en,
  input  word_t [THREADS-1:0][2:0] wr_data,
  output logic   issue_valid,
  output logic [TID_W-1:0] issue_slot,
  output instr_t issue_instr,
  output word_t  issue_a,
  output word_t  issue_b,
  output word_t  issue_c
);

  instr_t                    instr_q [THREADS];
  word_t  [2:0]              opnd_q  [THREADS];
  logic   [2:0]              have_q  [THREADS];
  logic   [THREADS-1:0]      fired_q;
  logic   [15:0]             lfsr_q;
  logic   [THREADS-1:0]      ready;

  always_comb begin
    for (int s = 0; s < THREADS; s++)
      ready[s] = instr_q[s].valid && !fired_q[s] &&
                 ((have_q[s] | ~instr_q[s].need) == 3'b111);
  end

  // Pick the first ready slot at or after the LFSR's starting point.
  always_comb begin
    logic [TID_W-1:0] cand;
    issue_valid = 1'b0;
    issue_slot  = '0;
    for (int k = THREADS - 1; k >= 0; k--) begin
      cand = lfsr_q[TID_W-1:0] + TID_W'(k);
      if (ready[cand]) begin
        issue_valid = 1'b1;
        issue_slot  = cand;
      end
    end
  end

  word_t imm_ext;
  assign issue_instr = instr_q[issue_slot];
  assign imm_ext     = word_t'(signed'(issue_instr.imm));
  assign issue_a     = issue_instr.need[0] ? opnd_q[issue_slot][0] : imm_ext;
  assign issue_b     = issue_instr.need[1] ? opnd_q[issue_slot][1] : imm_ext;
  assign issue_c     = issue_instr.need[2] ? opnd_q[issue_slot][2] : imm_ext;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q  <= 16'hACE1;
      fired_q <= '0;
      for (int s = 0; s < THREADS; s++) begin
        have_q[s]  <= '0;
        instr_q[s] <= '0;
      end
    end else begin
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      for (int s = 0; s < THREADS; s++) begin
        if (frame_clr || (load_en && load_slot == TID_W'(s))) begin
          have_q[s]  <= '0;
          fired_q[s] <= 1'b0;
        end else begin
          if (issue_valid && issue_slot == TID_W'(s)) fired_q[s] <= 1'b1;
          for (int o = 0; o < 3; o++)
            if (wr_en[s][o]) have_q[s][o] <= 1'b1;
        end
        if (load_en && load_slot == TID_W'(s)) instr_q[s] <= load_instr;
        else if (frame_clr)                    instr_q[s].valid <= 1'b0;
      end
    end
  end

  // Operand values need no reset: they are only read once their presence bit is set.
  always_ff @(posedge clk) begin
    for (int s = 0; s < THREADS; s++)
      for (int o = 0; o < 3; o++)
        if (wr_en[s][o]) opnd_q[s][o] <= wr_data[s][o];
  end

endmodule
