// mcu: memory coalescing unit placed in front of the load and store queues.
//
// To keep the L1 hit latency low the unit looks only for the two common
// patterns of a sub-batch memory instruction:
//   MCU_UNIFORM   every active lane touches the same word (shared data such as
//                 globals and constants): one access, broadcast to all lanes;
//   MCU_CONSEC    active lane l touches word w0 + (l - f) of a single cache
//                 line, f being the first active lane (stack slots after
//                 stack interleaving, arrays indexed by lane): one line access.
// Anything else is MCU_DIVERGENT and generates one access per active lane.
// The result is already in the shape of a load/store-queue row: slot_mask says
// which of the LANES address slots are used (slot 0 only when coalesced) and
// slot_addr holds their addresses (for a coalesced row, slot 0 holds the
// address of the first active lane; the other lanes' words follow from it).
//
// Timing: one sub-batch per cycle, registered (one cycle from in_valid to
// out_valid); an opaque payload (data, tags) travels alongside. The 4-byte
// word is this design's choice; the two patterns are those of the RPU.
module mcu
  import rpu_pkg::mcu_mode_e;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned VA_W       = 48,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned WORD_BYTES = 4,
  parameter int unsigned PAY_W      = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [LANES-1:0]            in_mask,
  input  logic [LANES-1:0][VA_W-1:0]  in_addr,
  input  logic [PAY_W-1:0]            in_payload,
  output logic                        out_valid,
  output mcu_mode_e                   out_mode,
  output logic [LANES-1:0]            out_lane_mask,
  output logic [LANES-1:0]            out_slot_mask,
  output logic [LANES-1:0][VA_W-1:0]  out_slot_addr,
  output logic [$clog2(LANES+1)-1:0]  out_n_access,
  output logic [PAY_W-1:0]            out_payload
);

  localparam int unsigned LW = $clog2(LINE_BYTES);
  localparam int unsigned WW = $clog2(WORD_BYTES);
  localparam int unsigned CW = $clog2(LANES + 1);

  mcu_mode_e                 mode_c;
  logic [LANES-1:0]          smask_c;
  logic [LANES-1:0][VA_W-1:0] saddr_c;
  logic [CW-1:0]             n_c;

  always_comb begin
    logic            found, uni, con;
    logic [VA_W-1:0] w0, a0;
    int unsigned     f;
    found = 1'b0;
    f     = 0;
    a0    = '0;
    for (int l = 0; l < LANES; l++)
      if (in_mask[l] && !found) begin
        found = 1'b1;
        f     = l;
        a0    = in_addr[l];
      end
    w0  = a0 >> WW;
    uni = 1'b1;
    con = 1'b1;
    for (int l = 0; l < LANES; l++)
      if (in_mask[l]) begin
        if ((in_addr[l] >> WW) != w0) uni = 1'b0;
        if ((in_addr[l] >> LW) != (a0 >> LW) ||
            (in_addr[l] >> WW) != w0 + VA_W'(l) - VA_W'(f)) con = 1'b0;
      end

    saddr_c = '0;
    smask_c = '0;
    n_c     = '0;
    if (!found) begin
      mode_c = rpu_pkg::MCU_NONE;
    end else if (uni) begin
      mode_c     = rpu_pkg::MCU_UNIFORM;
      smask_c[0] = 1'b1;
      saddr_c[0] = a0;
      n_c        = CW'(1);
    end else if (con) begin
      mode_c     = rpu_pkg::MCU_CONSEC;
      smask_c[0] = 1'b1;
      saddr_c[0] = a0;
      n_c        = CW'(1);
    end else begin
      mode_c  = rpu_pkg::MCU_DIVERGENT;
      smask_c = in_mask;
      saddr_c = in_addr;
      for (int l = 0; l < LANES; l++) n_c = n_c + CW'(in_mask[l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_mode      <= rpu_pkg::MCU_NONE;
      out_lane_mask <= '0;
      out_slot_mask <= '0;
      out_slot_addr <= '0;
      out_n_access  <= '0;
      out_payload   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_mode      <= mode_c;
        out_lane_mask <= in_mask;
        out_slot_mask <= smask_c;
        out_slot_addr <= saddr_c;
        out_n_access  <= n_c;
        out_payload   <= in_payload;
      end
    end
  end

endmodule
