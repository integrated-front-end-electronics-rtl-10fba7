// tdc_ctrl: TDC allocation and fine counters of one pixel.
//
// The pixel owns four TDCs. In single-photon mode each TDC works alone: one
// TDC at a time is armed, and once its hit has been seen (through a
// sync_cell) the arm moves round-robin to the next free TDC allowed by
// tdc_mask. In Time-over-Threshold mode the TDCs work in pairs {0,1} and
// {2,3}: the even TDC of the armed pair takes the leading edge and the odd
// one, armed directly by the even TDC's hit, takes the trailing edge, so the
// rate capability halves. Pairing, round-robin order and the masking are
// this implementation's choices; the four TDCs and the two modes follow the
// design description.
//
// Each TDC has a 9-bit fine counter that counts the clock cycles during
// which the TDC's run-down is high. On the first cycle of the run-down the
// coarse counter value is latched next to it. When the run-down ends the
// (TDC, coarse, fine) result is held until it is handed out on the ev_*
// valid/ready port, lowest TDC number first. After hand-out the TDC is
// released with clr (a ToT pair only when both halves are handed out), and
// it can be armed again once its hit flag is seen low.
module tdc_ctrl
  import alcor_pkg::*;
#(
  parameter int unsigned N = N_TDC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,
  input  logic                tot_mode,
  input  logic [N-1:0]        tdc_mask,
  input  logic [COARSE_W-1:0] coarse,
  input  logic [N-1:0]        hit,
  input  logic [N-1:0]        rundown,
  output logic [N-1:0]        arm,
  output logic [N-1:0]        clr,
  output logic                ev_valid,
  input  logic                ev_ready,
  output logic [TDC_W-1:0]    ev_tdc,
  output logic [COARSE_W-1:0] ev_coarse,
  output logic [FINE_W-1:0]   ev_fine
);

  localparam int unsigned PW = $clog2(N);

  logic [N-1:0]        hit_s, rd_q, res_valid, done, avail;
  logic [FINE_W-1:0]   fine_cnt  [N];
  logic [COARSE_W-1:0] coarse_lat[N];
  logic [PW-1:0]       ptr, ptr_next;
  logic                cur_ok;
  logic [TDC_W-1:0]    sel;
  logic                sel_valid;

  for (genvar i = 0; i < N; i++) begin : g_sync
    sync_cell u_sync (.clk, .rst_n, .async_i(hit[i]), .sync_o(hit_s[i]));
  end

  // a TDC is free when it is allowed, its hit is low and nothing is pending
  assign avail = tdc_mask & ~hit_s & ~res_valid & ~done & ~rd_q & ~rundown;

  // in ToT mode the pointer addresses the even TDC of a pair
  function automatic logic usable(input logic [PW-1:0] p, input logic tot,
                                  input logic [N-1:0] av);
    if (tot) return (p[0] == 1'b0) && av[p] && av[p+1];
    else     return av[p];
  endfunction

  always_comb begin
    cur_ok   = usable(ptr, tot_mode, avail);
    ptr_next = ptr;
    if (!cur_ok) begin
      for (int k = N - 1; k >= 1; k--) begin
        if (usable(ptr + PW'(k), tot_mode, avail)) ptr_next = ptr + PW'(k);
      end
    end
  end

  always_comb begin
    arm = '0;
    if (enable && cur_ok) begin
      arm[ptr] = 1'b1;
    end
    if (enable && tot_mode) begin
      for (int p = 0; p < N; p += 2) begin
        // trailing-edge TDC follows its leading partner's hit directly
        if (hit[p] && tdc_mask[p+1] && !hit_s[p+1] && !done[p+1] &&
            !res_valid[p+1] && !rd_q[p+1]) arm[p+1] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else        ptr <= ptr_next;
  end

  // result selection: lowest pending TDC first
  always_comb begin
    sel       = '0;
    sel_valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (res_valid[i]) begin
        sel       = TDC_W'(i);
        sel_valid = 1'b1;
      end
    end
  end

  assign ev_valid  = sel_valid;
  assign ev_tdc    = sel;
  assign ev_coarse = coarse_lat[sel];
  assign ev_fine   = fine_cnt[sel];

  for (genvar i = 0; i < N; i++) begin : g_tdc
    localparam int unsigned PARTNER = i ^ 1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rd_q[i]       <= 1'b0;
        res_valid[i]  <= 1'b0;
        done[i]       <= 1'b0;
        fine_cnt[i]   <= '0;
        coarse_lat[i] <= '0;
      end else begin
        rd_q[i] <= rundown[i];
        if (rundown[i] && !rd_q[i]) begin
          fine_cnt[i]   <= FINE_W'(1);
          coarse_lat[i] <= coarse;
        end else if (rundown[i]) begin
          fine_cnt[i]   <= fine_cnt[i] + 1'b1;
        end
        if (!rundown[i] && rd_q[i]) res_valid[i] <= 1'b1;
        if (ev_valid && ev_ready && sel == TDC_W'(i)) begin
          res_valid[i] <= 1'b0;
          done[i]      <= 1'b1;
        end
        if (done[i] && !hit_s[i]) done[i] <= 1'b0;
      end
    end
    assign clr[i] = done[i] && hit_s[i] && (!tot_mode || done[PARTNER]);
  end

endmodule
