// hazard_unit_tb: self-checking test of the hazard unit. Random register
// addresses (drawn from a small set so that matches are frequent) and control
// bits are applied; a reference written here as nested if-statements predicts
// the two forwarding selects and the stall and flush outputs. Each case of the
// unit (forward from Memory, from Writeback, load-use stall, R15 write
// pending, taken branch) must occur at least once.
module hazard_unit_tb;
  import arm_pkg::*;

  logic [3:0] ra1_d, ra2_d, ra1_e, ra2_e, wa3_e, wa3_m, wa3_w;
  logic       mem_to_reg_e, reg_write_m, reg_write_w;
  logic       pc_src_d, pc_src_e, pc_src_m, pc_src_w, branch_taken_e;
  fwd_sel_t   fwd_a_e, fwd_b_e;
  logic       ldr_stall, pc_wr_pending, stall_f, stall_d, flush_d, flush_e;
  int         checks = 0, failures = 0;
  int         n_mem = 0, n_wb = 0, n_ldr = 0, n_pend = 0, n_br = 0;

  hazard_unit dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_sel_t ref_fwd(input logic [3:0] ra);
    if (reg_write_m && ra == wa3_m) return FWD_MEM;
    if (reg_write_w && ra == wa3_w) return FWD_WB;
    return FWD_NONE;
  endfunction

  initial begin
    fwd_sel_t ea, eb;
    logic     el, ep, esf, esd, efd, efe;
    for (int n = 0; n < 5000; n++) begin
      {ra1_d, ra2_d, ra1_e, ra2_e, wa3_e, wa3_m, wa3_w} =
        {4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)),
         4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)), 4'($urandom_range(0, 3)),
         4'($urandom_range(0, 3))};
      {mem_to_reg_e, reg_write_m, reg_write_w} = 3'($urandom);
      pc_src_d = ($urandom_range(0, 5) == 0);
      pc_src_e = ($urandom_range(0, 5) == 0);
      pc_src_m = ($urandom_range(0, 5) == 0);
      pc_src_w = ($urandom_range(0, 5) == 0);
      branch_taken_e = ($urandom_range(0, 4) == 0);
      #1ns;
      ea  = ref_fwd(ra1_e);
      eb  = ref_fwd(ra2_e);
      el  = mem_to_reg_e && ((ra1_d == wa3_e) || (ra2_d == wa3_e));
      ep  = pc_src_d || pc_src_e || pc_src_m;
      esf = branch_taken_e ? 1'b0 : (el || ep);
      esd = el;
      efd = ep || pc_src_w || branch_taken_e;
      efe = el || branch_taken_e;
      n_mem  += int'(ea == FWD_MEM); n_wb += int'(eb == FWD_WB);
      n_ldr  += int'(el); n_pend += int'(ep); n_br += int'(branch_taken_e);
      checks++;
      if ({fwd_a_e, fwd_b_e, ldr_stall, pc_wr_pending, stall_f, stall_d, flush_d, flush_e} !==
          {ea, eb, el, ep, esf, esd, efd, efe}) begin
        failures++;
        $display("FAIL n=%0d got fa=%0d fb=%0d l=%b p=%b sf=%b sd=%b fd=%b fe=%b",
                 n, fwd_a_e, fwd_b_e, ldr_stall, pc_wr_pending, stall_f, stall_d, flush_d, flush_e);
      end
    end
    if (n_mem == 0 || n_wb == 0 || n_ldr == 0 || n_pend == 0 || n_br == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
