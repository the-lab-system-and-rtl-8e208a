// Shared Wishbone bus of the lab system: NM masters, two slaves.
//
// One master owns the bus at a time. When the bus is free, the requesting
// master (cyc high) with the lowest index wins; it keeps the bus for as
// long as it holds cyc, so a fill of several transfers is not interrupted
// only if the master keeps cyc high between them. The owner's signals go to
// both slaves; stb reaches the accelerator only if adr[31:24] == 0x96 and
// memory otherwise. The selected slave's ack and data return to the owner
// alone; every other master sees ack low. Arbitration costs no clock: a
// master that requests an idle bus is connected in the same cycle.
module wb_interconnect
  import wb_pkg::*;
#(
  parameter int NM = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t m_i [NM],
  output wb_s2m_t m_o [NM],
  output wb_m2s_t mem_o,
  input  wb_s2m_t mem_i,
  output wb_m2s_t acc_o,
  input  wb_s2m_t acc_i,
  output logic [NM-1:0] grant
);

  localparam int GW = (NM > 1) ? $clog2(NM) : 1;

  logic          locked;
  logic [GW-1:0] owner_q, owner;
  logic          any_req;
  wb_m2s_t       bus;
  wb_s2m_t       resp;
  logic          to_acc;

  always_comb begin
    any_req = 1'b0;
    owner   = owner_q;
    if (!locked) begin
      for (int i = NM - 1; i >= 0; i--)
        if (m_i[i].cyc) begin owner = GW'(i); any_req = 1'b1; end
    end else any_req = m_i[owner_q].cyc;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked  <= 1'b0;
      owner_q <= '0;
    end else begin
      locked  <= any_req && m_i[owner].cyc;
      owner_q <= owner;
    end
  end

  always_comb begin
    bus    = any_req ? m_i[owner] : WB_M2S_IDLE;
    to_acc = is_acc_adr(bus.adr);
    mem_o  = bus;
    acc_o  = bus;
    mem_o.stb = bus.stb && !to_acc;
    acc_o.stb = bus.stb && to_acc;
    mem_o.cyc = bus.cyc && !to_acc;
    acc_o.cyc = bus.cyc && to_acc;
  end

  always_comb begin
    resp   = to_acc ? acc_i : mem_i;
    for (int i = 0; i < NM; i++) begin
      m_o[i].dat = resp.dat;
      m_o[i].ack = any_req && owner == GW'(i) && resp.ack;
      grant[i]   = any_req && owner == GW'(i);
    end
  end

endmodule
