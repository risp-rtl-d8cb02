// risp_top: the reconfigurable unit (RU) of a RISP in-storage processing SSD,
// with its NVM channels and on-device DRAM emulated by on-chip RAM.
//
// N_CH channels each have an NVM array (nvm_emu), an NVM controller (nvmc)
// and a processing cell (proc_cell). A public processing cell (pub_cell)
// collects the cells' result lines into the global memory (global_mem, the
// on-device DRAM) and performs the K-Means reduction. The RU controller
// (ru_ctrl) is programmed by the embedded CPU over the cpu_* register port;
// it picks how many cells to enable (channel planner), forms the channel
// groups (channel mapper) and sequences a job. In regular mode the
// regular_path moves words between one channel's NVM and the DRAM instead.
//
// Routing: channel c's NVM controller takes commands from, and streams to,
// the cell on owner[c] while that cell is working on c (cur_ch); in regular
// mode the channel rp_ch is driven by the regular path. The host sees the
// global memory through host_* (granted only while the RU is idle) and is
// told by irq that results are ready. cell_power_en shows which processing
// cells are enabled; the other outputs expose events for observation.
//
// Timing: register writes take effect on the next clock; a job needs
// N_CH+1 cycles of mapping, then about LEN cycles per channel of a group for
// the byte kernels (LEN*2.25/9 for K-Means, set by the channel bandwidth),
// plus the line drain and, for K-Means, the reduction. The channel/cell/
// public-cell structure, the two modes, the memory ownership rule and the
// channel groups follow the RISP design; the register map, the line width
// and the RAM stand-ins for flash and DRAM are this design's own.
module risp_top
  import risp_pkg::*;
#(
  parameter int unsigned N_CH         = N_CH_DEF,
  parameter int unsigned NVM_WORDS    = NVM_WORDS_DEF,
  parameter int unsigned B_CH_MBPS    = B_CH_MBPS_DEF,
  parameter int unsigned F_RU_MHZ     = F_RU_MHZ_DEF,
  localparam int unsigned LINES_PER_CH = (NVM_WORDS * WORD_BYTES + LINE_BYTES - 1) / LINE_BYTES,
  localparam int unsigned GM_LINES     = N_CH * LINES_PER_CH + 1,
  localparam int unsigned GM_AW        = $clog2(GM_LINES),
  localparam int unsigned CHW          = clog2_min1(N_CH),
  localparam int unsigned NW           = $clog2(N_CH + 1),
  localparam int unsigned AW           = $clog2(NVM_WORDS),
  localparam int unsigned LW           = $clog2(NVM_WORDS * WORD_BYTES + 1),
  localparam int unsigned XW           = $clog2(SOBEL_MAX_W + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // embedded CPU register port
  input  logic                  cpu_we,
  input  logic [4:0]            cpu_addr,
  input  logic [31:0]           cpu_wdata,
  output logic [31:0]           cpu_rdata,
  // host access to the on-device DRAM
  input  logic                  host_req,
  input  logic                  host_we,
  input  logic [GM_AW-1:0]      host_addr,
  input  logic [LINE_W-1:0]     host_wdata,
  input  logic [LINE_BYTES-1:0] host_wmask,
  output logic                  host_gnt,
  output logic [LINE_W-1:0]     host_rdata,
  output logic                  irq,
  output logic                  busy,
  // observation
  output logic [N_CH-1:0]       cell_power_en,
  output logic [NW-1:0]         n_active,
  output logic                  ev_nvm_bw_stall,   // a channel held data for bandwidth
  output logic                  ev_cell_stall,     // a cell stalled on result write-back
  output logic                  ev_group_switch    // a cell moved on to another channel of its group
);
  // ---------------- controller ---------------------------------------------------
  mode_e mode;
  app_e  app;
  logic [31:0] len_bytes, res_base, cen_line, rp_nwords, rp_nvm_addr, rp_gm_line;
  logic [7:0]  threshold, cen_widx, cen_wdata;
  logic [15:0] img_width;
  logic        cen_we, cell_go, clr_acc, reduce, reduce_done, rp_start, rp_dir, rp_done, rp_busy;
  logic [N_CH-1:0] starts, cell_done, line_valid, line_ready;
  logic [CHW-1:0]  owner [N_CH];
  logic [CHW-1:0]  rp_ch;
  logic            ru_owns;

  ru_ctrl #(.N_CH(N_CH)) u_ctrl (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .mode, .app, .len_bytes, .threshold, .img_width, .res_base, .cen_line,
    .cen_we, .cen_widx, .cen_wdata, .starts, .owner, .n_active,
    .cell_go, .clr_acc, .cell_done, .lines_pending(|line_valid),
    .reduce, .reduce_done,
    .rp_start, .rp_dir, .rp_nwords, .rp_nvm_addr, .rp_gm_line, .rp_ch, .rp_done,
    .busy, .ru_owns, .irq);

  assign cell_power_en = starts;

  // ---------------- per-channel signals -----------------------------------------------
  logic              c_cmd_valid [N_CH], c_cmd_word [N_CH], c_cmd_ready [N_CH];
  logic [AW-1:0]     c_cmd_addr [N_CH];
  logic [LW-1:0]     c_cmd_len [N_CH];
  logic              c_in_valid [N_CH], c_in_ready [N_CH];
  logic [WORD_W-1:0] c_in_data [N_CH];
  logic [CHW-1:0]    c_cur [N_CH];
  logic [N_CH-1:0]   c_stalled;
  logic [GM_AW-1:0]  l_addr [N_CH];
  logic [LINE_W-1:0] l_data [N_CH];
  logic [LINE_BYTES-1:0] l_mask [N_CH];
  logic [KM_SUM_W-1:0] c_sums [N_CH][KM_NSUM];

  logic              n_cmd_valid [N_CH], n_cmd_write [N_CH], n_cmd_word [N_CH], n_cmd_ready [N_CH];
  logic [AW-1:0]     n_cmd_addr [N_CH];
  logic [LW-1:0]     n_cmd_len [N_CH];
  logic              n_out_valid [N_CH], n_out_ready [N_CH];
  logic [WORD_W-1:0] n_out_data [N_CH];
  logic              n_wr_valid [N_CH], n_wr_ready [N_CH];
  logic [N_CH-1:0]   n_thr_stall;

  logic [KM_K*KM_DIM*8-1:0] centers;

  // regular path <-> NVM controller
  logic              rp_cmd_valid, rp_cmd_write, rp_in_ready, rp_wr_valid;
  logic [AW-1:0]     rp_cmd_addr;
  logic [LW-1:0]     rp_cmd_len;
  logic [WORD_W-1:0] rp_wr_data;

  // ---------------- channels -------------------------------------------------------
  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic              rd_en, wr_en;
    logic [AW-1:0]     rd_addr, wr_addr;
    logic [WORD_W-1:0] rd_data, wr_data;
    logic              isp_sel, reg_sel;

    assign isp_sel = (mode == MODE_ISP) && (c_cur[owner[c]] == CHW'(c));
    assign reg_sel = (mode == MODE_REGULAR) && (rp_ch == CHW'(c));

    always_comb begin
      n_cmd_valid[c] = 1'b0;
      n_cmd_write[c] = 1'b0;
      n_cmd_word[c]  = 1'b1;
      n_cmd_addr[c]  = '0;
      n_cmd_len[c]   = '0;
      n_out_ready[c] = 1'b0;
      n_wr_valid[c]  = 1'b0;
      if (isp_sel) begin
        n_cmd_valid[c] = c_cmd_valid[owner[c]];
        n_cmd_word[c]  = c_cmd_word[owner[c]];
        n_cmd_addr[c]  = c_cmd_addr[owner[c]];
        n_cmd_len[c]   = c_cmd_len[owner[c]];
        n_out_ready[c] = c_in_ready[owner[c]];
      end else if (reg_sel) begin
        n_cmd_valid[c] = rp_cmd_valid;
        n_cmd_write[c] = rp_cmd_write;
        n_cmd_addr[c]  = rp_cmd_addr;
        n_cmd_len[c]   = rp_cmd_len;
        n_out_ready[c] = rp_in_ready;
        n_wr_valid[c]  = rp_wr_valid;
      end
    end

    nvm_emu #(.WORDS(NVM_WORDS)) u_nvm (
      .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

    nvmc #(.WORDS(NVM_WORDS), .B_CH_MBPS(B_CH_MBPS), .F_RU_MHZ(F_RU_MHZ)) u_nvmc (
      .clk, .rst_n,
      .cmd_valid(n_cmd_valid[c]), .cmd_write(n_cmd_write[c]), .cmd_word(n_cmd_word[c]),
      .cmd_addr(n_cmd_addr[c]), .cmd_len(n_cmd_len[c]), .cmd_ready(n_cmd_ready[c]),
      .out_valid(n_out_valid[c]), .out_data(n_out_data[c]), .out_ready(n_out_ready[c]),
      .thr_stall(n_thr_stall[c]),
      .wr_valid(n_wr_valid[c]), .wr_data(rp_wr_data), .wr_ready(n_wr_ready[c]),
      .nvm_rd_en(rd_en), .nvm_rd_addr(rd_addr), .nvm_rd_data(rd_data),
      .nvm_wr_en(wr_en), .nvm_wr_addr(wr_addr), .nvm_wr_data(wr_data));

    // the cell on this channel reads from the channel it is working on
    assign c_cmd_ready[c] = n_cmd_ready[c_cur[c]];
    assign c_in_valid[c]  = n_out_valid[c_cur[c]];
    assign c_in_data[c]   = n_out_data[c_cur[c]];

    proc_cell #(.N_CH(N_CH), .MY_CH(c), .WORDS(NVM_WORDS), .LINES_PER_CH(LINES_PER_CH),
                .GM_AW(GM_AW)) u_cell (
      .clk, .rst_n, .app, .cell_on(starts[c]), .starts, .go(cell_go), .done(cell_done[c]),
      .len_bytes(LW'(len_bytes)), .res_base(GM_AW'(res_base)), .threshold,
      .img_width(XW'(img_width)), .centers, .clr_acc, .km_sums(c_sums[c]),
      .cur_ch(c_cur[c]), .cmd_valid(c_cmd_valid[c]), .cmd_word(c_cmd_word[c]),
      .cmd_addr(c_cmd_addr[c]), .cmd_len(c_cmd_len[c]), .cmd_ready(c_cmd_ready[c]),
      .in_valid(c_in_valid[c]), .in_data(c_in_data[c]), .in_ready(c_in_ready[c]),
      .line_valid(line_valid[c]), .line_addr(l_addr[c]), .line_data(l_data[c]),
      .line_mask(l_mask[c]), .line_ready(line_ready[c]), .stalled(c_stalled[c]));
  end

  // ---------------- public processing cell and global memory ----------------------------
  logic                  pc_req, gm_ru_req, gm_ru_we, gm_ru_gnt;
  logic [GM_AW-1:0]      pc_addr, rp_gm_addr, gm_ru_addr;
  logic [LINE_W-1:0]     pc_wdata, rp_gm_wdata, gm_ru_wdata, gm_ru_rdata;
  logic [LINE_BYTES-1:0] pc_wmask, rp_gm_wmask, gm_ru_wmask;
  logic                  rp_gm_req, rp_gm_we;

  pub_cell #(.N_CH(N_CH), .GM_AW(GM_AW)) u_pub (
    .clk, .rst_n, .line_valid, .line_addr(l_addr), .line_data(l_data), .line_mask(l_mask),
    .line_ready, .gm_req(pc_req), .gm_addr(pc_addr), .gm_wdata(pc_wdata), .gm_wmask(pc_wmask),
    .gm_gnt(gm_ru_gnt && mode == MODE_ISP), .starts, .cell_sums(c_sums), .reduce,
    .cen_line(GM_AW'(cen_line)), .reduce_done, .cen_we, .cen_widx(cen_widx[$clog2(KM_K*KM_DIM)-1:0]),
    .cen_wdata, .centers);

  regular_path #(.WORDS(NVM_WORDS), .GM_AW(GM_AW)) u_rp (
    .clk, .rst_n, .start(rp_start), .dir(rp_dir), .nwords((AW+1)'(rp_nwords)),
    .nvm_addr(AW'(rp_nvm_addr)), .gm_line(GM_AW'(rp_gm_line)), .busy(rp_busy), .done(rp_done),
    .cmd_valid(rp_cmd_valid), .cmd_write(rp_cmd_write), .cmd_addr(rp_cmd_addr), .cmd_len(rp_cmd_len),
    .cmd_ready(n_cmd_ready[rp_ch]), .in_valid(n_out_valid[rp_ch]), .in_data(n_out_data[rp_ch]),
    .in_ready(rp_in_ready), .wr_valid(rp_wr_valid), .wr_data(rp_wr_data), .wr_ready(n_wr_ready[rp_ch]),
    .gm_req(rp_gm_req), .gm_we(rp_gm_we), .gm_addr(rp_gm_addr), .gm_wdata(rp_gm_wdata),
    .gm_wmask(rp_gm_wmask), .gm_gnt(gm_ru_gnt && mode == MODE_REGULAR), .gm_rdata(gm_ru_rdata));

  always_comb begin
    if (mode == MODE_ISP) begin
      gm_ru_req = pc_req;    gm_ru_we = 1'b1;     gm_ru_addr = pc_addr;
      gm_ru_wdata = pc_wdata; gm_ru_wmask = pc_wmask;
    end else begin
      gm_ru_req = rp_gm_req; gm_ru_we = rp_gm_we; gm_ru_addr = rp_gm_addr;
      gm_ru_wdata = rp_gm_wdata; gm_ru_wmask = rp_gm_wmask;
    end
  end

  global_mem #(.LINES(GM_LINES)) u_gm (
    .clk, .ru_owns,
    .host_req, .host_we, .host_addr, .host_wdata, .host_wmask, .host_gnt, .host_rdata,
    .ru_req(gm_ru_req), .ru_we(gm_ru_we), .ru_addr(gm_ru_addr), .ru_wdata(gm_ru_wdata),
    .ru_wmask(gm_ru_wmask), .ru_gnt(gm_ru_gnt), .ru_rdata(gm_ru_rdata));

  // ---------------- observation ------------------------------------------------------
  logic [N_CH-1:0] sw;
  for (genvar c = 0; c < N_CH; c++) begin : g_sw
    assign sw[c] = c_cmd_valid[c] && c_cmd_ready[c] && (c_cur[c] != CHW'(c));
  end
  assign ev_nvm_bw_stall = |n_thr_stall;
  assign ev_cell_stall   = |c_stalled;
  assign ev_group_switch = |sw;
endmodule
