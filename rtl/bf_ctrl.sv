// bf_ctrl: control logic of the accelerator, the processor's view of it.
// An AXI4-Lite slave holds the run registers of bf_pkg (key chunk address,
// result address, number of keys, number of hash functions, one MURMUR3
// seed per hash function, the update command) and a status register. Writing
// CTRL with bit 0 set issues a start: the configuration is latched into cfg,
// a one-cycle start pulse goes to the datapath and busy rises. When the
// datapath reports done, busy falls, status.done is set and, if enabled,
// irq (level) is raised until software clears done by writing 1 to it. A
// start with an out-of-range key or hash count, or while busy, is refused
// and sets status.error. A cycle counter measures start to done.
// AXI-Lite: a write is taken when AWVALID and WVALID are both high (one
// cycle, BRESP OKAY one cycle later); a read answers one cycle after ARVALID.
// The document names the registered items, status and interrupt; offsets,
// bit positions and the error and cycle registers are this design's.
module bf_ctrl
  import bf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [7:0]        s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [7:0]        s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // datapath
  output bf_cfg_t           cfg,
  output logic              start,
  input  logic              done,
  output logic              busy,
  output logic              irq
);
  bf_cfg_t     regs;
  logic        irq_en, done_flag, err_flag;
  logic [31:0] cycles;

  logic wr_en, rd_en, start_req, start_ok;

  assign s_awready = wr_en;
  assign s_wready  = wr_en;
  assign wr_en     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_arready = rd_en;
  assign rd_en     = s_arvalid && !s_rvalid;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  assign start_req = wr_en && s_awaddr == REG_CTRL && s_wstrb[0] && s_wdata[0];
  assign start_ok  = start_req && !busy
                  && regs.num_keys != 0 && regs.num_keys <= NKEYS_W'(MAX_KEYS)
                  && regs.num_hash != 0 && regs.num_hash <= NHASH_W'(MAX_HASH);
  assign irq = irq_en && done_flag;

  // Register writes. Byte strobes are honoured only as "any byte written"
  // (software is expected to write whole words).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs      <= '0;
      irq_en    <= 1'b0;
      done_flag <= 1'b0;
      err_flag  <= 1'b0;
      busy      <= 1'b0;
      start     <= 1'b0;
      cfg       <= '0;
      cycles    <= '0;
      s_bvalid  <= 1'b0;
    end else begin
      start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (busy) cycles <= cycles + 1'b1;
      if (done && busy) begin
        busy      <= 1'b0;
        done_flag <= 1'b1;
      end
      if (wr_en) begin
        s_bvalid <= 1'b1;
        if (|s_wstrb) begin
          unique case (s_awaddr)
            REG_CTRL: begin
              regs.update <= s_wdata[1];
              irq_en      <= s_wdata[2];
            end
            REG_STATUS: begin
              if (s_wdata[1]) done_flag <= 1'b0;
              if (s_wdata[2]) err_flag  <= 1'b0;
            end
            REG_DATA:   regs.data_addr   <= s_wdata;
            REG_RESULT: regs.result_addr <= s_wdata;
            REG_NKEYS:  regs.num_keys    <= s_wdata[NKEYS_W-1:0];
            REG_NHASH:  regs.num_hash    <= s_wdata[NHASH_W-1:0];
            default: begin
              for (int i = 0; i < MAX_HASH; i++)
                if (s_awaddr == REG_SEED0 + 8'(4*i)) regs.seeds[i] <= s_wdata;
            end
          endcase
        end
        if (start_ok) begin
          cfg        <= regs;
          cfg.update <= s_wdata[1];
          start      <= 1'b1;
          busy       <= 1'b1;
          done_flag  <= 1'b0;
          cycles     <= '0;
        end else if (start_req) begin
          err_flag <= 1'b1;
        end
      end
    end
  end

  // Register reads.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_en) begin
        s_rvalid <= 1'b1;
        s_rdata  <= '0;
        unique case (s_araddr)
          REG_CTRL:   s_rdata <= {29'd0, irq_en, regs.update, 1'b0};
          REG_STATUS: s_rdata <= {29'd0, err_flag, done_flag, busy};
          REG_DATA:   s_rdata <= regs.data_addr;
          REG_RESULT: s_rdata <= regs.result_addr;
          REG_NKEYS:  s_rdata <= 32'(regs.num_keys);
          REG_NHASH:  s_rdata <= 32'(regs.num_hash);
          REG_CYCLES: s_rdata <= cycles;
          default: begin
            for (int i = 0; i < MAX_HASH; i++)
              if (s_araddr == REG_SEED0 + 8'(4*i)) s_rdata <= regs.seeds[i];
          end
        endcase
      end
    end
  end

  a_done_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> busy);
endmodule
