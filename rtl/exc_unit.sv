// exc_unit: exception and interrupt handling at the commit point (MA).
//
// Exception flags raised in IF (misaligned PC), ID (illegal opcode,
// system call) and EX (overflow) travel down the pipe with their
// instruction; an earlier stage's flag is never overwritten by a later one.
// In MA this unit adds the last sources and decides, in this order:
//   asynchronous interrupt (injected here, overrides all others),
//   the carried flag, a privileged instruction in user mode, and a
//   misaligned data address of a load or store.
// If any applies to the valid instruction in MA, `take` is raised: Cause
// and EPC are written at the clock edge, interrupts are disabled and the
// processor enters kernel mode (the previous IE/UM pair is saved in
// Status), and the pipeline controller kills IF, ID, EX and the MA
// writeback and fetches from the handler PC. EPC is the PC of the
// instruction in MA, so everything older has completed and nothing younger
// has changed state (a precise exception); for SYSCALL, which counts as
// completed, EPC is the next PC.
// RFE committing in MA restores IE/UM from the saved pair and redirects
// fetch to EPC. MFC0 reads Status, Cause or EPC in MA; MTC0 writes Status
// or EPC at commit. Only the instruction in MA writes these registers, so
// nothing needs undoing when younger instructions are flushed.
// Register layout (MIPS-like, this design's choice):
//   Status: [0] IE, [1] UM (1 = user), [2] IE prev, [3] UM prev, [15:8] IM
//   Cause:  [6:2] ExcCode, [15:8] pending lines, [18:16] interrupt line
module exc_unit
  import pipe5_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // instruction in MA
  input  logic            valid_m,
  input  word_t           pc_m,
  input  exc_t            exc_m,
  input  logic            load_m,
  input  logic            store_m,
  input  word_t           addr_m,
  input  logic            priv_m,
  input  logic            rfe_m,
  input  logic            mtc0_m,
  input  reg_idx_t        cp0_sel,
  input  word_t           cp0_wdata,
  // interrupt request lines
  input  logic [NIRQ-1:0] irq,
  // commit decisions
  output logic            take,
  output exc_code_t       take_code,
  output word_t           take_epc,
  output logic            rfe_take,
  output logic            commit,     // MA instruction completes normally
  // coprocessor-0 state
  output word_t           epc,
  output word_t           status,
  output word_t           cause,
  output word_t           cp0_rdata
);
  logic                    irq_req;
  logic [$clog2(NIRQ)-1:0] irq_id;
  logic [NIRQ-1:0]         irq_pend;
  logic                    user;
  logic                    addr_err;

  irq_prio #(.N(NIRQ)) u_irq_prio (
    .irq     (irq),
    .mask    (status[ST_IM +: NIRQ]),
    .ie      (status[ST_IE]),
    .req     (irq_req),
    .id      (irq_id),
    .pending (irq_pend)
  );

  assign user     = status[ST_UM];
  assign addr_err = (load_m || store_m) && (addr_m[1:0] != 2'b00);

  always_comb begin
    take      = 1'b0;
    take_code = EXC_INT;
    if (valid_m) begin
      if (irq_req) begin
        take      = 1'b1;
        take_code = EXC_INT;
      end else if (exc_m.valid) begin
        take      = 1'b1;
        take_code = exc_m.code;
      end else if (priv_m && user) begin
        take      = 1'b1;
        take_code = EXC_CPU;
      end else if (addr_err) begin
        take      = 1'b1;
        take_code = store_m ? EXC_ADES : EXC_ADEL;
      end
    end
  end

  assign take_epc = (take_code == EXC_SYS) ? pc_m + word_t'(4) : pc_m;
  assign commit   = valid_m && !take;
  assign rfe_take = commit && rfe_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status <= '0;
      cause  <= '0;
      epc    <= '0;
    end else if (take) begin
      epc                <= take_epc;
      cause              <= '0;
      cause[6:2]         <= take_code;
      cause[15:8]        <= irq_pend;
      cause[18:16]       <= irq_id;
      status[ST_IEP]     <= status[ST_IE];
      status[ST_UMP]     <= status[ST_UM];
      status[ST_IE]      <= 1'b0;
      status[ST_UM]      <= 1'b0;
    end else if (rfe_take) begin
      status[ST_IE]      <= status[ST_IEP];
      status[ST_UM]      <= status[ST_UMP];
    end else if (commit && mtc0_m) begin
      if (cp0_sel == CP0_STATUS) begin
        status[3:0]             <= cp0_wdata[3:0];
        status[ST_IM +: NIRQ]   <= cp0_wdata[ST_IM +: NIRQ];
      end else if (cp0_sel == CP0_EPC) begin
        epc <= cp0_wdata;
      end
    end
  end

  always_comb begin
    unique case (cp0_sel)
      CP0_STATUS: cp0_rdata = status;
      CP0_CAUSE:  cp0_rdata = cause;
      CP0_EPC:    cp0_rdata = epc;
      default:    cp0_rdata = '0;
    endcase
  end
endmodule
