// hazard_unit: hazard detection and forwarding control of the ID stage.
//
// Looks at the instruction in decode and at the three older instructions in
// EX, MEM1 and MEM2 and decides, in the same cycle, (1) whether decode must
// stall and (2) where each execute-stage operand will come from when the
// instruction moves on. The selects are registered with the instruction into
// the ID/EX register, so the operand multiplexers in EX need no comparators.
//
// Forwarding: when the decode instruction reaches EX, a producer now in EX
// sits in the EX/MEM1 register (FWD_MEM1), one in MEM1 sits in MEM1/MEM2
// (FWD_MEM2), and one in MEM2 sits in MEM2/WB (FWD_WB). The youngest producer
// wins. Older results come from the register file, which writes through.
//
// Stalls: a load's data is known only at the end of MEM2, so a consumer
// directly behind a load (load in EX) or one further (load in MEM1) stalls.
// MFHI/MFLO stall while a MULT/MULTU, MTHI or MTLO is in EX, MEM1 or MEM2,
// because HI and LO are written in write-back. A stall holds IF1, IF2 and ID
// and sends a bubble into EX. These rules are this design's own; the pipeline
// only names hazard detection and a forwarding unit in decode.
module hazard_unit
  import mips_pkg::*;
(
  input  logic       id_valid,
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       id_uses_rs,
  input  logic       id_uses_rt,
  input  logic       id_reads_hilo,
  input  hz_src_t    ex,
  input  hz_src_t    mem1,
  input  hz_src_t    mem2,
  output logic       stall,
  output fwd_e       fwd_a,
  output fwd_e       fwd_b
);

  function automatic logic writes(hz_src_t s, logic [4:0] r);
    return s.valid && s.reg_write && (s.dest != 5'd0) && (s.dest == r);
  endfunction

  function automatic fwd_e pick(logic [4:0] r);
    if (writes(ex, r))        return FWD_MEM1;
    else if (writes(mem1, r)) return FWD_MEM2;
    else if (writes(mem2, r)) return FWD_WB;
    else                      return FWD_NONE;
  endfunction

  logic load_use, hilo_use;

  always_comb begin
    fwd_a = pick(id_rs);
    fwd_b = pick(id_rt);
    load_use = (id_uses_rs && ((writes(ex, id_rs) && ex.load) || (writes(mem1, id_rs) && mem1.load))) ||
               (id_uses_rt && ((writes(ex, id_rt) && ex.load) || (writes(mem1, id_rt) && mem1.load)));
    hilo_use = id_reads_hilo && ((ex.valid && ex.writes_hilo) ||
                                 (mem1.valid && mem1.writes_hilo) ||
                                 (mem2.valid && mem2.writes_hilo));
    stall = id_valid && (load_use || hilo_use);
  end

endmodule
