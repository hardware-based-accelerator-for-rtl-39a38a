// mtree_tb_pkg: test support for the M-tree accelerator testbenches.
//
// build_tree() organises a list of values into an M-tree with two entries per
// node, the way a host would before loading the accelerator: the sorted values
// are split in halves recursively; each half becomes a routing object whose
// value is the half's median element and whose covering radius is the largest
// distance from that value to a member; a group of one or two values becomes
// a leaf node. Node 0 is the root. Object k holds data k+1 (nonzero, so a
// stale zero cannot pass for a result).
//
// ref_query() answers a query in two independent ways: a linear scan of every
// object (the set of correct results), and a software walk of the tree in the
// accelerator's order (the expected output order and the visit counts from
// which the cycle count follows).
package mtree_tb_pkg;
  import mtree_pkg::*;

  localparam int MAXN = 256;

  node_t tb_nodes [MAXN];
  ro_t   tb_ros   [MAXN];
  obj_t  tb_objs  [MAXN];
  val_t  tb_obj_val [MAXN];
  int    n_nodes, n_ros, n_objs;
  int    tree_levels;

  function automatic val_t ad(val_t a, val_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  // sorted value list used while building
  val_t sv [MAXN];

  // make one entry (routing object) for sv[lo..hi]; returns its ro address
  function automatic int make_ro(int lo, int hi, val_t parent, int level);
    int    mid, a, i;
    val_t  c, rad;
    mid = (lo + hi) / 2;
    c   = sv[mid];
    rad = '0;
    for (i = lo; i <= hi; i++) if (ad(sv[i], c) > rad) rad = ad(sv[i], c);
    a = n_ros++;
    tb_ros[a].value  = c;
    tb_ros[a].radius = rad;
    tb_ros[a].dpar   = ad(c, parent);
    tb_ros[a].ptr    = addr_t'(build_node(lo, hi, c, level + 1));
    return a;
  endfunction

  // build the node for sv[lo..hi]; returns its node address
  function automatic int build_node(int lo, int hi, val_t parent, int level);
    int n, cnt, mid, a;
    n   = n_nodes++;
    cnt = hi - lo + 1;
    if (level > tree_levels) tree_levels = level;
    tb_nodes[n] = '0;
    if (cnt <= 2) begin
      tb_nodes[n].leaf = 1'b1;
      for (int k = 0; k < cnt; k++) begin
        int o;
        o = n_objs++;
        tb_objs[o]    = obj_t'(o + 1);
        tb_obj_val[o] = sv[lo+k];
        a = n_ros++;
        tb_ros[a].value  = sv[lo+k];
        tb_ros[a].radius = '0;
        tb_ros[a].dpar   = ad(sv[lo+k], parent);
        tb_ros[a].ptr    = addr_t'(o);
        if (k == 0) begin tb_nodes[n].valid0 = 1'b1; tb_nodes[n].ro_addr0 = addr_t'(a); end
        else        begin tb_nodes[n].valid1 = 1'b1; tb_nodes[n].ro_addr1 = addr_t'(a); end
      end
    end else begin
      mid = (lo + hi) / 2;
      tb_nodes[n].valid0   = 1'b1;
      tb_nodes[n].valid1   = 1'b1;
      tb_nodes[n].ro_addr0 = addr_t'(make_ro(lo, mid, parent, level));
      tb_nodes[n].ro_addr1 = addr_t'(make_ro(mid + 1, hi, parent, level));
    end
    return n;
  endfunction

  // vals[0..cnt-1] -> tree in tb_nodes/tb_ros/tb_objs
  function automatic void build_tree(val_t vals [], int cnt);
    val_t t;
    for (int i = 0; i < cnt; i++) sv[i] = vals[i];
    for (int i = 0; i < cnt; i++)
      for (int j = 0; j + 1 < cnt - i; j++)
        if (sv[j] > sv[j+1]) begin t = sv[j]; sv[j] = sv[j+1]; sv[j+1] = t; end
    for (int i = 0; i < MAXN; i++) begin
      tb_nodes[i] = '0; tb_ros[i] = '0; tb_objs[i] = '0; tb_obj_val[i] = '0;
    end
    n_nodes = 0; n_ros = 0; n_objs = 0; tree_levels = 0;
    void'(build_node(0, cnt - 1, '0, 1));
  endfunction

  function automatic int load_words();
    int m;
    m = n_nodes;
    if (n_ros > m)  m = n_ros;
    if (n_objs > m) m = n_objs;
    return m;
  endfunction

  // ---------------------------------------------------------------- reference
  obj_t exp_seq [MAXN];   // expected outputs, in accelerator order
  int   exp_cnt;
  bit   exp_set [MAXN];   // linear-scan result set, indexed by object data
  int   scan_cnt;
  int   ref_nodes, ref_pops, ref_cycles;

  function automatic bit entry_ok(val_t q, val_t r, val_t dpq, bit hp, bit leaf, ro_t e,
                                  output val_t d);
    int lim;
    lim = int'(r) + (leaf ? 0 : int'(e.radius));
    d   = ad(e.value, q);
    if (hp && int'(ad(dpq, e.dpar)) > lim) return 1'b0;
    return int'(d) <= lim;
  endfunction

  function automatic void ref_query(val_t q, val_t r);
    int   qn [$];
    val_t qd [$];
    bit   qh [$];
    int   cn;
    val_t cd, d;
    bit   ch, hit;
    node_t nd;
    exp_cnt = 0; scan_cnt = 0;
    for (int i = 0; i < MAXN; i++) exp_set[i] = 1'b0;
    for (int o = 0; o < n_objs; o++)
      if (ad(tb_obj_val[o], q) <= r) begin exp_set[o+1] = 1'b1; scan_cnt++; end
    ref_nodes = 0; ref_pops = 0;
    cn = 0; cd = '0; ch = 1'b0;
    forever begin
      ref_nodes++;
      nd = tb_nodes[cn];
      hit = nd.valid0 && entry_ok(q, r, cd, ch, nd.leaf, tb_ros[nd.ro_addr0], d);
      if (hit && nd.leaf) exp_seq[exp_cnt++] = tb_objs[tb_ros[nd.ro_addr0].ptr];
      if (hit && !nd.leaf) begin
        qn.push_back(int'(tb_ros[nd.ro_addr0].ptr)); qd.push_back(d); qh.push_back(1'b1);
      end
      hit = nd.valid1 && entry_ok(q, r, cd, ch, nd.leaf, tb_ros[nd.ro_addr1], d);
      if (hit && nd.leaf) exp_seq[exp_cnt++] = tb_objs[tb_ros[nd.ro_addr1].ptr];
      if (hit && !nd.leaf) begin
        cn = int'(tb_ros[nd.ro_addr1].ptr); cd = d; ch = 1'b1;
      end else if (qn.size() > 0) begin
        ref_pops++;
        cn = qn.pop_front(); cd = qd.pop_front(); ch = qh.pop_front();
      end else break;
    end
    ref_cycles = 2 * ref_nodes + ref_pops + 2;
  endfunction

endpackage
