// Configuration unit: serial configuration link and global registers.
//
// The chip is configured over a bidirectional serial link at 80 Mb/s, half
// the 160 MHz master clock, so one bit lasts two clock cycles. Each command
// is a start bit (1) followed by 28 bits, MSB first:
//   rw (1 = write, 0 = read) | chip address [6:0] | register address [7:0] |
//   data [11:0] (ignored for reads)
// A command is executed only if the chip address matches the chip's Address
// pins. Register address bit 7 selects a channel register: bits [6:4] region,
// [3:1] channel, [0] configuration word 0 or 1. Otherwise bits [2:0] select
// one of 8 global registers. A read is answered on the same line: the unit
// enables its driver (sdo_oe) and sends a start bit and the 12 data bits,
// two cycles each, starting two cycles after the last command bit.
//
// The link waits in idle for a 1 on sdi (registered once on input); the
// first command bit is then sampled three cycles after the start bit was
// seen, i.e. in the second half of each bit. The global registers and the
// link state (receive and reply shift registers, counters, state) are
// triplicated (tmr_reg), as the chip's control logic is.
//
// Global register map (own choice): 0 control (see gctrl_t), 1 test pulse
// DAC (bits [5:0] amplitude, bit 6 extended range), 2..7 analog bias DAC
// codes passed to the front end. The 80 Mb/s rate, the bidirectional link,
// the Address pins and the global registers follow the chip; the command
// format, timing and register map are this design's own.
module config_unit
  import toast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CHIPID_W-1:0]  chip_addr,
  input  logic                 sdi,
  output logic                 sdo,
  output logic                 sdo_oe,
  output logic [CFG_W-1:0]     gregs [N_GREGS],
  // channel configuration access
  output logic                 ch_wr,
  output logic                 ch_rd,
  output logic [2:0]           ch_region,
  output logic [2:0]           ch_ch,
  output logic                 ch_sel,
  output logic [CFG_W-1:0]     ch_wdata,
  input  logic [CFG_W-1:0]     ch_rdata
);
  localparam int unsigned CMD_W = 1 + CHIPID_W + 8 + CFG_W;  // 28

  typedef enum logic [1:0] {S_IDLE, S_RX, S_EXEC, S_TX} state_t;

  // Link state, held in one triplicated register.
  typedef struct packed {
    state_t           state;
    logic             sdi_q;   // sdi, registered once
    logic [1:0]       div;
    logic [4:0]       bitcnt;
    logic [CMD_W-1:0] sh;
    logic [CFG_W:0]   tx_sh;   // start bit + data
    logic             sdo_oe;
  } link_t;

  link_t              cur, nxt;

  logic               cmd_rw;
  logic [CHIPID_W-1:0] cmd_addr;
  logic [7:0]         cmd_reg;
  logic [CFG_W-1:0]   cmd_data;
  logic               hit, exec;
  logic [N_GREGS-1:0] g_we;

  assign {cmd_rw, cmd_addr, cmd_reg, cmd_data} = cur.sh;
  assign exec = (cur.state == S_EXEC);
  assign hit  = (cmd_addr == chip_addr);

  tmr_reg #(.W($bits(link_t))) u_link (
    .clk, .rst, .en(1'b1), .d(nxt), .q(cur)
  );

  always_comb begin
    nxt       = cur;
    nxt.sdi_q = sdi;
    unique case (cur.state)
      S_IDLE: begin
        nxt.sdo_oe = 1'b0;
        if (cur.sdi_q) begin
          nxt.state  = S_RX;
          nxt.div    = 2'd2;
          nxt.bitcnt = '0;
        end
      end
      S_RX: begin
        if (cur.div == 2'd0) begin
          nxt.sh     = {cur.sh[CMD_W-2:0], cur.sdi_q};
          nxt.div    = 2'd1;
          nxt.bitcnt = cur.bitcnt + 1'b1;
          if (cur.bitcnt == 5'(CMD_W - 1)) nxt.state = S_EXEC;
        end else begin
          nxt.div = cur.div - 1'b1;
        end
      end
      S_EXEC: begin
        if (hit && !cmd_rw) begin
          nxt.state  = S_TX;
          nxt.tx_sh  = {1'b1, cmd_reg[7] ? ch_rdata : gregs[cmd_reg[2:0]]};
          nxt.sdo_oe = 1'b1;
          nxt.div    = 2'd1;
          nxt.bitcnt = '0;
        end else begin
          nxt.state = S_IDLE;
        end
      end
      S_TX: begin
        if (cur.div == 2'd0) begin
          nxt.div    = 2'd1;
          nxt.tx_sh  = {cur.tx_sh[CFG_W-1:0], 1'b0};
          nxt.bitcnt = cur.bitcnt + 1'b1;
          if (cur.bitcnt == 5'(CFG_W)) begin
            nxt.state  = S_IDLE;
            nxt.sdo_oe = 1'b0;
          end
        end else begin
          nxt.div = cur.div - 1'b1;
        end
      end
      default: nxt.state = S_IDLE;
    endcase
  end

  assign sdo_oe = cur.sdo_oe;
  assign sdo = cur.sdo_oe & cur.tx_sh[CFG_W];

  // Channel register access, one cycle in S_EXEC.
  assign ch_wr     = exec && hit &&  cmd_rw && cmd_reg[7];
  assign ch_rd     = exec && hit && !cmd_rw && cmd_reg[7];
  assign ch_region = cmd_reg[6:4];
  assign ch_ch     = cmd_reg[3:1];
  assign ch_sel    = cmd_reg[0];
  assign ch_wdata  = cmd_data;

  // Global registers.
  for (genvar g = 0; g < N_GREGS; g++) begin : g_reg
    assign g_we[g] = exec && hit && cmd_rw && !cmd_reg[7] && (cmd_reg[2:0] == 3'(g));
    tmr_reg #(.W(CFG_W), .RESET_VAL(g == 0 ? GCTRL_RESET : '0)) u_reg (
      .clk, .rst,
      .en (g_we[g]),
      .d  (cmd_data),
      .q  (gregs[g])
    );
  end
endmodule
