// ahb_slave: AMBA AHB(-Lite) slave interface and control registers of the
// processor.
//
// The host CPU loads operands, curve parameters and the key, starts a
// command and reads results through this 32-bit slave. Zero wait states:
// HREADYOUT is always high and HRESP always OKAY. The address phase is
// registered; write data are taken in the data phase, read data are
// driven combinationally in the data phase. Only word transfers are
// supported. Byte address map (12 bits):
//   0x000-0x7FF  register file: entry = A[10:7], word = A[6:2]
//   0x800-0x87F  modulus p (prime, or irreducible polynomial incl. x^m)
//   0x880-0x8FF  key_pos: NAF digits equal to +1
//   0x900-0x97F  key_neg: NAF digits equal to -1
//   0xA00  CMD    write: [3:0] command, [5:4] field op, [7:6] domain,
//                 [11:8] dst, [15:12] src A, [19:16] src B; starts it
//   0xA04  CFG    [10:0] field size m, [16] 1 = GF(2^m), [17] countermeasure on
//   0xA08  STATUS [0] busy, [1] done (sticky, write 1 to clear), [2] error
//   0xA0C  SEED   write: reseeds the random generator
// Writes to the register file, p, the key and CFG are ignored while the
// processor is busy, and so is a command. `irq` is the sticky done flag.
// The bus and its use follow the design; the register map is this RTL's.
// Reset is synchronous, active low.
module ahb_slave
  import ecc_pkg::*;
#(
  parameter int unsigned N  = N_MAX,
  parameter int unsigned NW = (N + 31) / 32
) (
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic                  hsel,
  input  logic [11:0]           haddr,
  input  logic [1:0]            htrans,
  input  logic                  hwrite,
  input  logic [2:0]            hsize,
  input  logic [31:0]           hwdata,
  input  logic                  hready,
  output logic [31:0]           hrdata,
  output logic                  hreadyout,
  output logic                  hresp,
  output logic                  irq,
  // register file host port
  output logic                  rf_hwe,
  output rf_addr_e              rf_hreg,
  output logic [$clog2(NW)-1:0] rf_hword,
  output logic [31:0]           rf_hwdata,
  input  logic [31:0]           rf_hrdata,
  // configuration
  output logic [N:0]            p,
  output logic [N:0]            fl,
  output field_e                field,
  output logic                  cm_en,
  output logic [N:0]            key_pos,
  output logic [N:0]            key_neg,
  // command
  output logic                  cmd_start,
  output cmd_e                  cmd,
  output gf_op_e                ff_op,
  output dom_e                  ff_dom,
  output rf_addr_e              ff_dst,
  output rf_addr_e              ff_a,
  output rf_addr_e              ff_b,
  input  logic                  busy,
  input  logic                  done,
  input  logic                  error,
  // random generator seed
  output logic                  seed_we,
  output logic [31:0]           seed
);
  localparam int unsigned PW = (N + 1 + 31) / 32;   // words of p and key
  localparam logic [11:0] A_CMD = 12'hA00, A_CFG = 12'hA04,
                          A_STATUS = 12'hA08, A_SEED = 12'hA0C;

  logic [PW*32-1:0] p_q, kp_q, kn_q;
  logic [10:0]      m_q;
  logic             done_q;

  // ------------------------------------------------------- address phase
  logic        dp_valid, dp_write;
  logic [11:0] dp_addr;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      dp_valid <= 1'b0;
      dp_write <= 1'b0;
      dp_addr  <= '0;
    end else if (hready) begin
      dp_valid <= hsel && htrans[1];
      dp_write <= hwrite;
      dp_addr  <= haddr;
    end
  end

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  // ------------------------------------------------------- data phase
  logic wr;
  assign wr = dp_valid && dp_write;

  logic [4:0] widx;
  assign widx = dp_addr[6:2];

  assign rf_hreg   = rf_addr_e'(dp_addr[10:7]);
  assign rf_hword  = widx[$clog2(NW)-1:0];
  assign rf_hwdata = hwdata;
  assign rf_hwe    = wr && !dp_addr[11] && !busy && (widx < 5'(NW));

  assign cmd_start = wr && (dp_addr == A_CMD) && !busy;
  assign cmd       = cmd_e'(hwdata[3:0]);
  assign ff_op     = gf_op_e'(hwdata[5:4]);
  assign ff_dom    = dom_e'(hwdata[7:6]);
  assign ff_dst    = rf_addr_e'(hwdata[11:8]);
  assign ff_a      = rf_addr_e'(hwdata[15:12]);
  assign ff_b      = rf_addr_e'(hwdata[19:16]);
  assign seed_we   = wr && (dp_addr == A_SEED);
  assign seed      = hwdata;

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      p_q    <= '0;
      kp_q   <= '0;
      kn_q   <= '0;
      m_q    <= '0;
      field  <= FIELD_P;
      cm_en  <= 1'b1;
      done_q <= 1'b0;
    end else begin
      if (done) done_q <= 1'b1;
      if (wr && !busy && widx < 5'(PW)) begin
        unique case (dp_addr[11:7])
          5'b10000: p_q [widx*32 +: 32] <= hwdata;
          5'b10001: kp_q[widx*32 +: 32] <= hwdata;
          5'b10010: kn_q[widx*32 +: 32] <= hwdata;
          default: ;
        endcase
      end
      if (wr && !busy && dp_addr == A_CFG) begin
        m_q   <= hwdata[10:0];
        field <= field_e'(hwdata[16]);
        cm_en <= hwdata[17];
      end
      if (wr && dp_addr == A_STATUS && hwdata[1]) done_q <= 1'b0;
      if (cmd_start) done_q <= 1'b0;
    end
  end

  assign p       = p_q[N:0];
  assign key_pos = kp_q[N:0];
  assign key_neg = kn_q[N:0];
  assign fl      = (N+1)'(1) << m_q;
  assign irq     = done_q;

  always_comb begin
    hrdata = '0;
    if (dp_valid && !dp_write) begin
      if (!dp_addr[11]) hrdata = rf_hrdata;
      else unique case (dp_addr[11:7])
        5'b10000: hrdata = p_q [widx*32 +: 32];
        5'b10001: hrdata = kp_q[widx*32 +: 32];
        5'b10010: hrdata = kn_q[widx*32 +: 32];
        5'b10100: unique case (dp_addr)
          A_CFG:    hrdata = {14'b0, cm_en, field, 5'b0, m_q};
          A_STATUS: hrdata = {29'b0, error, done_q, busy};
          default:  ;
        endcase
        default: ;
      endcase
    end
  end

  // Only word transfers are supported.
  assert property (@(posedge hclk) disable iff (!hresetn)
                   (hsel && hready && htrans[1]) |-> (hsize == 3'b010))
    else $error("ahb_slave: non-word transfer");

endmodule
