// fpu_token_ring: lets N processors share one bus-attached FPU by passing it round a ring.
//
// The document shares each Fastsim FPU among the Fastsim processors in a fixed rotation:
// when a processor has finished its access it informs the next one, which then accesses the
// FPU, and the last informs the first. Here that rotation is a one-hot token. The
// processor holding the token is connected straight through to the FPU; it passes the token
// on by writing the FPU window's INFORM register. Any other access to the FPU by a processor
// that does not hold the token is held off with waitrequest until the token reaches it.
// Reading the TOKEN register always answers at once (1: this processor holds the FPU).
// That the inform is a register write moving a token, and that waiting is done with
// waitrequest, are this design's choices; the rotation order and the rule that only the
// informing processor hands the FPU on follow the document.
//
// Interface: per master m, `m_sel[m]` marks a bus cycle in this FPU's window, `m_req[m]` is
// the request, `m_rsp[m]` the response. The FPU side gets `s_sel`/`s_req` from the holder
// and returns `s_rsp`. `grant` shows the token. Timing: the token moves at the clock edge
// that ends the INFORM write; the next processor can access the FPU in the following cycle.
module fpu_token_ring
  import wrc_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     m_sel [N],
  input  bus_req_t m_req [N],
  output bus_rsp_t m_rsp [N],
  output logic     s_sel,
  output bus_req_t s_req,
  input  bus_rsp_t s_rsp,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] holder;
  logic          inform;

  always_comb begin
    grant = '0;
    grant[holder] = 1'b1;
  end

  // The holder's request goes to the FPU, except its INFORM/TOKEN accesses.
  always_comb begin
    logic [2:0] reg_off;
    reg_off = m_req[holder].addr[2:0];
    s_req   = m_req[holder];
    s_sel   = m_sel[holder] && reg_off != FPU_REG_INFORM && reg_off != FPU_REG_TOKEN;
    inform  = m_sel[holder] && m_req[holder].write && reg_off == FPU_REG_INFORM;
  end

  always_comb begin
    for (int m = 0; m < N; m++) begin
      logic [2:0] off;
      off      = m_req[m].addr[2:0];
      m_rsp[m] = '{readdata: '0, waitrequest: 1'b0};
      if (m_sel[m]) begin
        if (off == FPU_REG_TOKEN) begin
          m_rsp[m].readdata = {31'd0, holder == IW'(m)};
        end else if (holder == IW'(m)) begin
          if (off != FPU_REG_INFORM) m_rsp[m] = s_rsp;
        end else if (m_req[m].read || m_req[m].write) begin
          m_rsp[m].waitrequest = 1'b1;
        end
      end
    end
  end

  // Exactly one processor holds the FPU, and only the holder's requests reach it.
  assert property (@(posedge clk) disable iff (!rst_n) holder < IW'(N));
  assert property (@(posedge clk) disable iff (!rst_n) s_sel |-> m_sel[holder]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) holder <= '0;
    else if (inform) holder <= (holder == IW'(N - 1)) ? '0 : holder + 1'b1;
  end

endmodule
