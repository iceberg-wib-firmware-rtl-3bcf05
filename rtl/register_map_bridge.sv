// register_map_bridge: carries register reads and writes from the register
// map's clock (clk_reg_map) into the seven clock domains of the firmware and
// brings read data back.
//
// A write (WR_strobe with WR_address and data_in) or a read (RD_strobe with
// RD_address) is routed to domain d = address[15:12] (0..6). The address and
// data are held in clk_reg_map registers and a request pulse crosses to
// clk_domain[d] through a pacd. There write_addr_data_valid[d] (or
// read_address_valid[d]) rises with write_addr[d]/write_data[d] (or
// read_address[d]) and stays high until the domain answers with
// write_addr_data_ack[d] (or read_address_ack[d]). A write completes when the
// ack has crossed back. A read completes when the domain strobes
// read_data_wr[d] with read_data[d]; the word is held in the domain and its
// low 32 bits reach data_out when the completion pulse has crossed back.
// One access is in flight at a time. Read addresses (RD_strobe with
// RD_address) are queued in a read-address FIFO of RD_FIFO_DEPTH entries and
// served in order; a read strobe while the FIFO is full is dropped. A
// WR_strobe is taken only while the bridge is idle (it is ignored while busy)
// and goes ahead of queued reads. An access to an address with
// d = 7..15, to a domain whose clk_domain_locked bit is low, or one that gets
// no answer within TIMEOUT clocks completes at once with error set (reads
// then return 32'hDEADBEEF). done pulses for one clk_reg_map cycle at the end
// of every access. reset is synchronous to clk_reg_map and is passed to each
// domain through a two-flop reset synchroniser.
// The ports, the seven domains, their valid/ack pairs and the read-address
// FIFO follow the firmware's block; the address-to-domain map, the
// one-access-at-a-time rule, the FIFO depth, the timeout and the busy, done
// and error outputs are this design's choice.
module register_map_bridge #(
  parameter int unsigned DOMAINS = 7,
  parameter int unsigned TIMEOUT = 1024,
  parameter int unsigned RD_FIFO_DEPTH = 4
) (
  input  logic                           clk_reg_map,
  input  logic                           reset,
  input  logic                           WR_strobe,
  input  logic                           RD_strobe,
  input  logic [31:0]                    data_in,
  input  logic [15:0]                    WR_address,
  input  logic [15:0]                    RD_address,
  input  logic [DOMAINS-1:0]             clk_domain,
  input  logic [DOMAINS-1:0]             clk_domain_locked,
  input  logic [DOMAINS-1:0]             read_address_ack,
  input  logic [DOMAINS-1:0]             read_data_wr,
  input  logic [DOMAINS-1:0][35:0]       read_data,
  input  logic [DOMAINS-1:0]             write_addr_data_ack,
  output logic [31:0]                    data_out,
  output logic [DOMAINS-1:0]             read_address_valid,
  output logic [DOMAINS-1:0][15:0]       read_address,
  output logic [DOMAINS-1:0]             write_addr_data_valid,
  output logic [DOMAINS-1:0][15:0]       write_addr,
  output logic [DOMAINS-1:0][31:0]       write_data,
  output logic                           busy,
  output logic                           done,
  output logic                           error
);
  localparam int unsigned TW = $clog2(TIMEOUT + 1);
  localparam int unsigned DW = (DOMAINS > 1) ? $clog2(DOMAINS) : 1;

  logic [15:0]  addr_q;
  logic [31:0]  wdata_q;
  logic [DW-1:0] dom_q;
  logic         is_read_q;
  logic [TW-1:0] timer;
  logic [DOMAINS-1:0] wr_req, rd_req, wr_done, rd_done;
  logic [DOMAINS-1:0][31:0] rd_hold;
  logic [DOMAINS-1:0][1:0]  locked_sync;

  // Lock status seen in clk_reg_map.
  always_ff @(posedge clk_reg_map) begin
    for (int d = 0; d < DOMAINS; d++)
      locked_sync[d] <= reset ? 2'b00 : {locked_sync[d][0], clk_domain_locked[d]};
  end

  // Read-address FIFO: read requests queue here and are served in order,
  // one at a time, whenever no write is being started.
  localparam int unsigned FW = (RD_FIFO_DEPTH > 1) ? $clog2(RD_FIFO_DEPTH) : 1;
  logic [15:0]   rd_fifo [RD_FIFO_DEPTH];
  logic [FW-1:0] rd_wp, rd_rp;
  logic [FW:0]   rd_count;
  logic          rd_push, rd_pop;
  assign rd_push = RD_strobe && (rd_count != (FW+1)'(RD_FIFO_DEPTH));

  always_ff @(posedge clk_reg_map) begin
    if (reset) begin
      rd_wp <= '0; rd_rp <= '0; rd_count <= '0;
    end else begin
      if (rd_push) begin
        rd_fifo[rd_wp] <= RD_address;
        rd_wp <= (rd_wp == FW'(RD_FIFO_DEPTH - 1)) ? '0 : rd_wp + 1'b1;
      end
      if (rd_pop) rd_rp <= (rd_rp == FW'(RD_FIFO_DEPTH - 1)) ? '0 : rd_rp + 1'b1;
      rd_count <= rd_count + (FW+1)'(rd_push) - (FW+1)'(rd_pop);
    end
  end

  // Access being started: domain number and whether it can be served.
  logic [15:0] req_addr;
  logic [3:0]  req_dom;
  logic        req_ok, req_go, start_wr;
  assign start_wr = !busy && WR_strobe;
  assign rd_pop   = !busy && !WR_strobe && (rd_count != '0);
  assign req_addr = start_wr ? WR_address : rd_fifo[rd_rp];
  assign req_dom  = req_addr[15:12];
  assign req_go   = start_wr || rd_pop;
  always_comb begin
    req_ok = 1'b0;
    for (int d = 0; d < DOMAINS; d++)
      if (req_dom == 4'(d) && locked_sync[d][1]) req_ok = 1'b1;
  end

  always_ff @(posedge clk_reg_map) begin
    if (reset) begin
      busy <= 1'b0; done <= 1'b0; error <= 1'b0; data_out <= '0;
      addr_q <= '0; wdata_q <= '0; dom_q <= '0; is_read_q <= 1'b0; timer <= '0;
      wr_req <= '0; rd_req <= '0;
    end else begin
      done <= 1'b0; wr_req <= '0; rd_req <= '0;
      if (req_go) begin
        addr_q <= req_addr; wdata_q <= data_in; dom_q <= req_dom[DW-1:0]; is_read_q <= !start_wr;
        timer  <= '0;
        if (req_ok) begin
          busy <= 1'b1; error <= 1'b0;
          if (start_wr) wr_req[req_dom[DW-1:0]] <= 1'b1;
          else           rd_req[req_dom[DW-1:0]] <= 1'b1;
        end else begin
          done <= 1'b1; error <= 1'b1;
          if (!start_wr) data_out <= 32'hDEADBEEF;
        end
      end else if (busy) begin
        timer <= timer + 1'b1;
        if (!is_read_q && wr_done[dom_q]) begin
          busy <= 1'b0; done <= 1'b1;
        end else if (is_read_q && rd_done[dom_q]) begin
          busy <= 1'b0; done <= 1'b1; data_out <= rd_hold[dom_q];
        end else if (timer == TW'(TIMEOUT)) begin
          busy <= 1'b0; done <= 1'b1; error <= 1'b1;
          if (is_read_q) data_out <= 32'hDEADBEEF;
        end
      end
    end
  end

  for (genvar d = 0; d < DOMAINS; d++) begin : g_dom
    logic [1:0] rst_sync;
    logic       rst_d, wr_req_d, rd_req_d, wr_ack_d, rd_wr_d;

    // reseter: reset held into this domain's clock
    always_ff @(posedge clk_domain[d]) rst_sync <= {rst_sync[0], reset};
    assign rst_d = rst_sync[1];

    pacd u_wr_req (.clk_in(clk_reg_map), .reset_in(reset), .pulse_in(wr_req[d]),
                   .clk_out(clk_domain[d]), .reset_out(rst_d), .pulse_out(wr_req_d));
    pacd u_rd_req (.clk_in(clk_reg_map), .reset_in(reset), .pulse_in(rd_req[d]),
                   .clk_out(clk_domain[d]), .reset_out(rst_d), .pulse_out(rd_req_d));
    pacd u_wr_ack (.clk_in(clk_domain[d]), .reset_in(rst_d), .pulse_in(wr_ack_d),
                   .clk_out(clk_reg_map), .reset_out(reset), .pulse_out(wr_done[d]));
    pacd u_rd_dat (.clk_in(clk_domain[d]), .reset_in(rst_d), .pulse_in(rd_wr_d),
                   .clk_out(clk_reg_map), .reset_out(reset), .pulse_out(rd_done[d]));

    assign rd_wr_d  = read_data_wr[d];

    logic        wvalid, rvalid;
    logic [15:0] waddr, raddr;
    logic [31:0] wdata, hold;
    always_ff @(posedge clk_domain[d]) begin
      if (rst_d) begin
        wvalid <= 1'b0; rvalid <= 1'b0; waddr <= '0; wdata <= '0; raddr <= '0; hold <= '0;
      end else begin
        // addr_q and wdata_q are stable from the request until the access ends.
        if (wr_req_d) begin
          wvalid <= 1'b1; waddr <= addr_q; wdata <= wdata_q;
        end else if (write_addr_data_ack[d]) begin
          wvalid <= 1'b0;
        end
        if (rd_req_d) begin
          rvalid <= 1'b1; raddr <= addr_q;
        end else if (read_address_ack[d]) begin
          rvalid <= 1'b0;
        end
        if (read_data_wr[d]) hold <= read_data[d][31:0];
      end
    end
    assign write_addr_data_valid[d] = wvalid;
    assign write_addr[d]            = waddr;
    assign write_data[d]            = wdata;
    assign read_address_valid[d]    = rvalid;
    assign read_address[d]          = raddr;
    assign rd_hold[d]               = hold;
    assign wr_ack_d = wvalid && write_addr_data_ack[d];
  end
endmodule
